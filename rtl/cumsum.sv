// cumsum: running sum of a streamed histogram.
//
// Each input word is a bin count; the block sends out, for bin i, the sum of
// the counts of bins 0..i, so the last word of a histogram is the number of
// samples that fell into some bin. TLAST marks the last bin; the sum is
// cleared after it so that the next histogram starts from zero.
//
// The processor starts one conversion by writing 1 to bit 0 of the control
// register (REG_CTRL, see ip_ctrl). The input is ready only while a
// conversion runs, so a histogram that arrives early waits on the stream.
// The run ends, and `done` and the interrupt rise, when the word carrying
// TLAST has been taken in.
//
// Interface: AXI-Lite control port (only the control register), 32-bit
// AXI-Stream in and out with TLAST passed through (TKEEP all ones),
// interrupt = done. The output is a single register stage: a word leaves one
// cycle after it arrives, and the block takes a word in every cycle in which
// its output register is empty or being emptied, so it runs at one bin per
// cycle. A histogram of N_BINS bins is through in N_BINS + 1 cycles.
//
// From the source design: the running-sum algorithm and its place between the
// histogram and interpolation stages, joined by AXI-Stream, and a control
// port with an interrupt like the other stages. This design's own: the
// register map, the end of a run at TLAST and the single-register output
// stage.
module cumsum
  import cu_pkg::*;
#(
  parameter int unsigned SUM_W = AXIS_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // AXI-Lite control
  input  logic [AXIL_AW-1:0]    s_axil_awaddr,
  input  logic                  s_axil_awvalid,
  output logic                  s_axil_awready,
  input  logic [AXIL_DW-1:0]    s_axil_wdata,
  input  logic [AXIL_DW/8-1:0]  s_axil_wstrb,
  input  logic                  s_axil_wvalid,
  output logic                  s_axil_wready,
  output logic [1:0]            s_axil_bresp,
  output logic                  s_axil_bvalid,
  input  logic                  s_axil_bready,
  input  logic [AXIL_AW-1:0]    s_axil_araddr,
  input  logic                  s_axil_arvalid,
  output logic                  s_axil_arready,
  output logic [AXIL_DW-1:0]    s_axil_rdata,
  output logic [1:0]            s_axil_rresp,
  output logic                  s_axil_rvalid,
  input  logic                  s_axil_rready,
  // histogram stream in
  input  logic [AXIS_W-1:0]     s_axis_tdata,
  input  logic                  s_axis_tvalid,
  output logic                  s_axis_tready,
  input  logic                  s_axis_tlast,
  // cumulative-sum stream out
  output logic [AXIS_W-1:0]     m_axis_tdata,
  output logic [AXIS_BYTES-1:0] m_axis_tkeep,
  output logic                  m_axis_tvalid,
  input  logic                  m_axis_tready,
  output logic                  m_axis_tlast,
  output logic                  interrupt
);

  logic [SUM_W-1:0] acc_q;     // sum of the bins before the current one
  logic [SUM_W-1:0] sum;
  logic             take;

  reg_wr_t              wr;
  logic                 rd_en;
  logic [AXIL_AW-1:0]   rd_addr;
  logic [AXIL_DW-1:0]   rd_data, ctrl_word;
  logic                 start, busy, finish;

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

  assign rd_data = (rd_addr == REG_CTRL) ? ctrl_word : '0;

  // A start needs no action here: `busy` opens the input until TLAST.
  logic unused_start;
  assign unused_start = start;

  assign s_axis_tready = busy && (!m_axis_tvalid || m_axis_tready);
  assign take          = s_axis_tvalid && s_axis_tready;
  assign sum           = acc_q + SUM_W'(s_axis_tdata);
  assign m_axis_tkeep  = '1;
  assign finish        = take && s_axis_tlast;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q         <= '0;
      m_axis_tvalid <= 1'b0;
      m_axis_tdata  <= '0;
      m_axis_tlast  <= 1'b0;
    end else begin
      if (take) begin
        m_axis_tvalid <= 1'b1;
        m_axis_tdata  <= AXIS_W'(sum);
        m_axis_tlast  <= s_axis_tlast;
        acc_q         <= s_axis_tlast ? '0 : sum;
      end else if (m_axis_tready) begin
        m_axis_tvalid <= 1'b0;
      end
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata));

endmodule
