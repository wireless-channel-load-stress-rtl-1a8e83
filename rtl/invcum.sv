// invcum: percentile estimate from a streamed cumulative histogram.
//
// Given the window size N (REG_WINDOW) and a probability p (REG_PROB, unsigned
// 0.16 fraction), the block finds the CU value Q below which a fraction p of
// the window's samples lies, by inverting the piecewise-linear cumulative
// distribution of the histogram:
//
//   P   = N * p                                   (target sample count)
//   c_0 = 0, c_k = cumulative count at the upper edge x_k = k*BIN_SIZE of bin k-1
//   k   : the first interval with c_k <= P < c_(k+1)
//   Q   = x_k + (P - c_k) * BIN_SIZE / (c_(k+1) - c_k)
//
// On start it forms P, then takes the cumulative sums c_1..c_NBINS from its
// input stream, one per cycle, keeping the first pair that brackets P. After
// TLAST it runs one bit-serial division and writes Q to REG_RESULT as unsigned
// 16.16 (the fraction truncated) and k to REG_BIN, then raises `done`.
// If P is not below the last sum (p too close to 1, or samples fell outside
// the bins) the result is the top edge N_BINS*BIN_SIZE and REG_BIN reads
// N_BINS.
//
// Interface: AXI-Lite control port, 32-bit AXI-Stream input of cumulative
// sums, interrupt = done. The input is ready only while a run is in
// progress, so a stream that arrives early waits (back-pressure) until the
// processor starts the block.
// Timing: 1 cycle to form P, N_BINS cycles for the stream when it is not
// stalled, DIV_W + 2 cycles for the division and result.
//
// From the source design: P = window * p, the interval search, the straight
// line through the two bracketing points and its inversion, the probability
// and result registers. This design's own: the pairing of each cumulative
// sum with the upper edge of its bin (so the curve starts at (0, 0)), the
// fixed-point formats, the clamp at the top edge and the serial divider.
module invcum
  import cu_pkg::*;
#(
  parameter int unsigned N_BINS   = N_BINS_DEF,
  parameter int unsigned BIN_SIZE = BIN_SIZE_DEF,
  parameter int unsigned CNT_W    = AXIS_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // AXI-Lite control
  input  logic [AXIL_AW-1:0]   s_axil_awaddr,
  input  logic                 s_axil_awvalid,
  output logic                 s_axil_awready,
  input  logic [AXIL_DW-1:0]   s_axil_wdata,
  input  logic [AXIL_DW/8-1:0] s_axil_wstrb,
  input  logic                 s_axil_wvalid,
  output logic                 s_axil_wready,
  output logic [1:0]           s_axil_bresp,
  output logic                 s_axil_bvalid,
  input  logic                 s_axil_bready,
  input  logic [AXIL_AW-1:0]   s_axil_araddr,
  input  logic                 s_axil_arvalid,
  output logic                 s_axil_arready,
  output logic [AXIL_DW-1:0]   s_axil_rdata,
  output logic [1:0]           s_axil_rresp,
  output logic                 s_axil_rvalid,
  input  logic                 s_axil_rready,
  // cumulative-sum stream in
  input  logic [AXIS_W-1:0]    s_axis_tdata,
  input  logic                 s_axis_tvalid,
  output logic                 s_axis_tready,
  input  logic                 s_axis_tlast,
  output logic                 interrupt
);

  localparam int unsigned P_W   = CNT_W + PROB_FRAC;              // N*p, 16 fraction bits
  localparam int unsigned BS_W  = $clog2(BIN_SIZE + 1);
  localparam int unsigned DIV_W = P_W + BS_W;                     // (P - c_k) * BIN_SIZE
  localparam int unsigned K_W   = $clog2(N_BINS + 1);

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_DIV, S_WAIT} state_e;

  state_e               state;
  reg_wr_t              wr;
  logic                 rd_en;
  logic [AXIL_AW-1:0]   rd_addr;
  logic [AXIL_DW-1:0]   rd_data, ctrl_word;
  logic                 start, busy, finish;

  logic [AXIL_DW-1:0]   window_q, prob_q, result_q;
  logic [K_W-1:0]       bin_q;

  logic [P_W-1:0]       p_cnt_q;      // P = N * p
  logic [CNT_W-1:0]     prev_q;       // c_k of the interval being looked at
  logic [K_W-1:0]       k_q;          // index k of that interval
  logic                 found_q;
  logic [CNT_W-1:0]     lo_q, hi_q;   // c_k and c_(k+1) of the bracketing interval
  logic [K_W-1:0]       kf_q;

  logic                 take, above;
  logic [CNT_W-1:0]     c_in;

  logic                 div_start, div_busy, div_done;
  logic [DIV_W-1:0]     div_num, div_quot;
  logic [CNT_W-1:0]     div_den, div_rem;

  axil_slave u_axil (
    .clk, .rst_n,
    .s_awaddr (s_axil_awaddr),  .s_awvalid(s_axil_awvalid), .s_awready(s_axil_awready),
    .s_wdata  (s_axil_wdata),   .s_wstrb  (s_axil_wstrb),   .s_wvalid (s_axil_wvalid),
    .s_wready (s_axil_wready),  .s_bresp  (s_axil_bresp),   .s_bvalid (s_axil_bvalid),
    .s_bready (s_axil_bready),  .s_araddr (s_axil_araddr),  .s_arvalid(s_axil_arvalid),
    .s_arready(s_axil_arready), .s_rdata  (s_axil_rdata),   .s_rresp  (s_axil_rresp),
    .s_rvalid (s_axil_rvalid),  .s_rready (s_axil_rready),
    .wr, .rd_en, .rd_addr, .rd_data
  );

  ip_ctrl u_ctrl (
    .clk, .rst_n, .wr, .rd_en, .rd_addr, .finish, .start, .busy, .ctrl_word,
    .irq(interrupt)
  );

  serial_div #(.NUM_W(DIV_W), .DEN_W(CNT_W)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quot(div_quot), .rem(div_rem)
  );

  always_comb begin
    unique case (rd_addr)
      REG_CTRL:   rd_data = ctrl_word;
      REG_WINDOW: rd_data = window_q;
      REG_PROB:   rd_data = prob_q;
      REG_RESULT: rd_data = result_q;
      REG_BIN:    rd_data = AXIL_DW'(bin_q);
      default:    rd_data = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      window_q <= '0;
      prob_q   <= '0;
    end else if (wr.en) begin
      if (wr.addr == REG_WINDOW) window_q <= apply_strb(window_q, wr.data, wr.strb);
      if (wr.addr == REG_PROB)   prob_q   <= apply_strb(prob_q, wr.data, wr.strb) & AXIL_DW'({PROB_FRAC{1'b1}});
    end
  end

  assign s_axis_tready = (state == S_SCAN);
  assign take          = s_axis_tvalid && s_axis_tready;
  assign c_in          = CNT_W'(s_axis_tdata);
  // c_(k+1) > P, compared with P's fraction bits
  assign above         = {c_in, {PROB_FRAC{1'b0}}} > p_cnt_q;

  assign div_start = (state == S_DIV);
  assign div_num   = DIV_W'(P_W'(p_cnt_q - {lo_q, {PROB_FRAC{1'b0}}})) * DIV_W'(BIN_SIZE);
  assign div_den   = hi_q - lo_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      p_cnt_q  <= '0;
      prev_q   <= '0;
      k_q      <= '0;
      found_q  <= 1'b0;
      lo_q     <= '0;
      hi_q     <= '0;
      kf_q     <= '0;
      result_q <= '0;
      bin_q    <= '0;
      finish   <= 1'b0;
    end else begin
      finish <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            p_cnt_q <= P_W'(CNT_W'(window_q)) * P_W'(prob_q[PROB_FRAC-1:0]);
            prev_q  <= '0;
            k_q     <= '0;
            found_q <= 1'b0;
            state   <= S_SCAN;
          end
        end
        S_SCAN: begin
          if (take) begin
            if (!found_q && above) begin
              found_q <= 1'b1;
              lo_q    <= prev_q;
              hi_q    <= c_in;
              kf_q    <= k_q;
            end
            prev_q <= c_in;
            k_q    <= k_q + 1'b1;
            if (s_axis_tlast) begin
              if (found_q || above) begin
                state <= S_DIV;
              end else begin
                result_q <= AXIL_DW'(N_BINS * BIN_SIZE) << RES_FRAC;
                bin_q    <= K_W'(N_BINS);
                finish   <= 1'b1;
                state    <= S_IDLE;
              end
            end
          end
        end
        S_DIV: begin
          state <= S_WAIT;
        end
        S_WAIT: begin
          if (div_done) begin
            result_q <= (AXIL_DW'(kf_q) * AXIL_DW'(BIN_SIZE) << RES_FRAC) + AXIL_DW'(div_quot);
            bin_q    <= kf_q;
            finish   <= 1'b1;
            state    <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Only the quotient is used; the remainder is the truncated fraction.
  logic unused_div;
  assign unused_div = div_busy | (|div_rem);

  // The stage's own state and the control register's busy bit agree.
  a_run_busy: assert property (@(posedge clk) disable iff (!rst_n) state != S_IDLE |-> busy);

  a_div_nonzero: assert property (@(posedge clk) disable iff (!rst_n) div_start |-> div_den != '0);

endmodule
