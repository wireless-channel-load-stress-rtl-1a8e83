// makehist: histogram of one window of channel-utilization samples.
//
// After the processor writes the window size W (register REG_WINDOW) and
// starts a run (REG_CTRL bit 0), the block takes W samples from its input
// stream, one per cycle. Each sample x is tested against every bin interval
// [i*BIN_SIZE, (i+1)*BIN_SIZE) at once and the counter of the bin that holds
// it is incremented; a sample beyond the last bin edge matches no bin and is
// not counted. Once W samples are in, the N_BINS counts are sent on the output
// stream, bin 0 first, TLAST on the last bin, and each counter is cleared as
// it is sent, so the next window starts from zero. Then `done` is raised.
//
// Interface: AXI-Lite control port (see axil_slave, ip_ctrl), 32-bit
// AXI-Stream input of samples (unsigned integers, TLAST ignored: the window
// size decides where a window ends), 32-bit AXI-Stream output of counts,
// interrupt = done.
// Timing: with an unstalled input and output, `done` rises W + 1 + N_BINS
// cycles after the first sample is taken: W cycles of counting, one cycle to
// turn to sending, N_BINS cycles of sending.
//
// From the source design: the bin-interval test and bin order, counting
// per window of a programmed size, streaming the counts out and clearing them.
// This design's own: the testing of all bins in parallel (one sample per
// cycle), the dropping of out-of-range samples without a flag, no extra
// zero word after the last bin, and the register map.
module makehist
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
  // sample stream in
  input  logic [AXIS_W-1:0]    s_axis_tdata,
  input  logic                 s_axis_tvalid,
  output logic                 s_axis_tready,
  input  logic                 s_axis_tlast,
  // histogram stream out
  output logic [AXIS_W-1:0]    m_axis_tdata,
  output logic [AXIS_BYTES-1:0] m_axis_tkeep,
  output logic                 m_axis_tvalid,
  input  logic                 m_axis_tready,
  output logic                 m_axis_tlast,
  output logic                 interrupt
);

  localparam int unsigned IDX_W = (N_BINS > 1) ? $clog2(N_BINS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_COUNT, S_SEND} state_e;

  state_e               state;
  reg_wr_t              wr;
  logic                 rd_en;
  logic [AXIL_AW-1:0]   rd_addr;
  logic [AXIL_DW-1:0]   rd_data, ctrl_word;
  logic                 start, busy, finish;

  logic [AXIL_DW-1:0]   window_q;   // programmed window size
  logic [AXIL_DW-1:0]   left_q;     // samples still to take in this run
  logic [CNT_W-1:0]     hist_q [N_BINS];
  logic [IDX_W-1:0]     send_idx;

  logic                 hit;
  logic [IDX_W-1:0]     hit_idx;
  logic                 take;

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

  always_comb begin
    unique case (rd_addr)
      REG_CTRL:   rd_data = ctrl_word;
      REG_WINDOW: rd_data = window_q;
      default:    rd_data = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   window_q <= '0;
    else if (wr.en && wr.addr == REG_WINDOW)      window_q <= apply_strb(window_q, wr.data, wr.strb);
  end

  // Bin search: every interval is tested at once, the lowest match wins.
  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = N_BINS - 1; i >= 0; i--) begin
      if (AXIS_W'(s_axis_tdata) >= AXIS_W'(i * BIN_SIZE) &&
          AXIS_W'(s_axis_tdata) <  AXIS_W'((i + 1) * BIN_SIZE)) begin
        hit     = 1'b1;
        hit_idx = IDX_W'(i);
      end
    end
  end

  assign s_axis_tready = (state == S_COUNT) && (left_q != '0);
  assign take          = s_axis_tvalid && s_axis_tready;

  assign m_axis_tvalid = (state == S_SEND);
  assign m_axis_tdata  = AXIS_W'(hist_q[send_idx]);
  assign m_axis_tkeep  = '1;
  assign m_axis_tlast  = (send_idx == IDX_W'(N_BINS - 1));
  assign finish        = m_axis_tvalid && m_axis_tready && m_axis_tlast;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      left_q   <= '0;
      send_idx <= '0;
      for (int i = 0; i < N_BINS; i++) hist_q[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            left_q <= window_q;
            state  <= S_COUNT;
          end
        end
        S_COUNT: begin
          if (left_q == '0) begin
            send_idx <= '0;
            state    <= S_SEND;
          end else if (take) begin
            left_q <= left_q - 1'b1;
            if (hit) hist_q[hit_idx] <= hist_q[hit_idx] + 1'b1;
          end
        end
        S_SEND: begin
          if (m_axis_tready) begin
            hist_q[send_idx] <= '0;
            if (m_axis_tlast) state <= S_IDLE;
            else              send_idx <= send_idx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // TLAST of the sample stream carries no meaning here.
  logic unused_tlast;
  assign unused_tlast = s_axis_tlast;

  // The stage's own state and the control register's busy bit agree.
  a_run_busy: assert property (@(posedge clk) disable iff (!rst_n) state != S_IDLE |-> busy);

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata));

endmodule
