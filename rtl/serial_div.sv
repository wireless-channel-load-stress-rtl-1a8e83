// serial_div: unsigned restoring divider, one quotient bit per cycle.
//
// `start` loads the numerator and denominator; NUM_W cycles later `done`
// pulses for one cycle with quot = num / den (truncated) and rem = num % den.
// While `busy` a new start is ignored. The result of a division by zero is
// meaningless; the caller never asks for one. The interpolation stage uses
// it for its single division; the bit-serial form, which keeps that stage
// small, is this design's choice, the source design giving no details of
// its divider.
module serial_div #(
  parameter int unsigned NUM_W = 51,
  parameter int unsigned DEN_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [NUM_W-1:0] quot,
  output logic [DEN_W-1:0] rem
);

  localparam int unsigned CNT_W = $clog2(NUM_W + 1);

  logic [NUM_W-1:0] q_q;      // numerator bits still to bring down, quotient bits shifted in
  logic [DEN_W:0]   r_q;      // partial remainder
  logic [DEN_W-1:0] d_q;
  logic [CNT_W-1:0] n_q;
  logic [DEN_W:0]   r_sh, r_sub;

  assign r_sh  = {r_q[DEN_W-1:0], q_q[NUM_W-1]};
  assign r_sub = r_sh - {1'b0, d_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_q  <= '0;
      r_q  <= '0;
      d_q  <= '0;
      n_q  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        q_q  <= num;
        r_q  <= '0;
        d_q  <= den;
        n_q  <= CNT_W'(NUM_W);
        busy <= 1'b1;
      end else if (busy) begin
        if (!r_sub[DEN_W]) begin
          r_q <= r_sub;
          q_q <= {q_q[NUM_W-2:0], 1'b1};
        end else begin
          r_q <= r_sh;
          q_q <= {q_q[NUM_W-2:0], 1'b0};
        end
        n_q <= n_q - 1'b1;
        if (n_q == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quot = q_q;
  assign rem  = r_q[DEN_W-1:0];

endmodule
