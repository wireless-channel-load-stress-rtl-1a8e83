// cu_stress_pl: programmable-logic part of a channel-utilization stress
// forecaster.
//
// A window of channel-utilization (CU) samples arrives on the AXI-Stream input
// (in the full system, from a DMA engine reading processor memory). Three
// stages joined by AXI-Stream turn it into a percentile estimate:
//
//   makehist  -> histogram of the window (N_BINS bins of BIN_SIZE)
//   cumsum    -> running sum of the histogram
//   invcum    -> CU value below which a fraction p of the window lies,
//                by linear interpolation between the bracketing bin edges
//
// The processor reaches the stages' registers through one AXI-Lite port:
// addresses 0x0000-0x0FFF are makehist's (window size, start/done), 0x1000-
// 0x1FFF cumsum's (start/done), 0x2000-0x2FFF invcum's (window size,
// probability p, result, start/done); 0x3000-0x3FFF is unmapped and answers
// DECERR. Address bits above bit 13 are ignored. A run: write the window size
// to makehist and invcum and p to invcum, start all three, stream the window
// in, then wait for invcum's interrupt (bit 2 of `interrupt`; bit 0 is
// makehist's, bit 1 cumsum's) and read the result. A stage that is not
// started yet holds the stream back, so the order of starting does not
// matter.
//
// Timing (unstalled, all stages started before the stream): W samples in W
// cycles, one turn-around cycle, N_BINS cycles of histogram output that pass
// through cumsum with one cycle of delay, then 54 cycles of division and
// result in invcum: about W + 77 cycles for the default 20 bins, 257 cycles
// for a 180-sample window.
//
// The three stages, their order, the stream links, a control port and an
// interrupt on each stage follow the source design; its processor, DMA
// engine, memory, reset block, interrupt concatenation and serial link to a
// host are outside this block. The address map and the bin layout are this
// design's choices.
module cu_stress_pl
  import cu_pkg::*;
#(
  parameter int unsigned N_BINS   = N_BINS_DEF,
  parameter int unsigned BIN_SIZE = BIN_SIZE_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // AXI-Lite control from the processor
  input  logic [31:0]           s_axil_awaddr,
  input  logic                  s_axil_awvalid,
  output logic                  s_axil_awready,
  input  logic [AXIL_DW-1:0]    s_axil_wdata,
  input  logic [AXIL_DW/8-1:0]  s_axil_wstrb,
  input  logic                  s_axil_wvalid,
  output logic                  s_axil_wready,
  output logic [1:0]            s_axil_bresp,
  output logic                  s_axil_bvalid,
  input  logic                  s_axil_bready,
  input  logic [31:0]           s_axil_araddr,
  input  logic                  s_axil_arvalid,
  output logic                  s_axil_arready,
  output logic [AXIL_DW-1:0]    s_axil_rdata,
  output logic [1:0]            s_axil_rresp,
  output logic                  s_axil_rvalid,
  input  logic                  s_axil_rready,
  // CU sample stream (from the DMA engine's memory-to-stream channel)
  input  logic [AXIS_W-1:0]     s_axis_tdata,
  input  logic                  s_axis_tvalid,
  output logic                  s_axis_tready,
  input  logic                  s_axis_tlast,
  // stage interrupts: bit 0 makehist, bit 1 cumsum, bit 2 invcum
  output logic [2:0]            interrupt
);

  localparam int unsigned N_SLV = 3;
  localparam int unsigned SLV_HIST = 0;
  localparam int unsigned SLV_CSUM = 1;
  localparam int unsigned SLV_INV  = 2;

  logic [AXIL_AW-1:0]   awaddr  [N_SLV];
  logic [N_SLV-1:0]     awvalid, awready;
  logic [AXIL_DW-1:0]   wdata   [N_SLV];
  logic [AXIL_DW/8-1:0] wstrb   [N_SLV];
  logic [N_SLV-1:0]     wvalid, wready;
  logic [1:0]           bresp   [N_SLV];
  logic [N_SLV-1:0]     bvalid, bready;
  logic [AXIL_AW-1:0]   araddr  [N_SLV];
  logic [N_SLV-1:0]     arvalid, arready;
  logic [AXIL_DW-1:0]   rdata   [N_SLV];
  logic [1:0]           rresp   [N_SLV];
  logic [N_SLV-1:0]     rvalid, rready;

  // histogram stream
  logic [AXIS_W-1:0]     h_tdata;
  logic [AXIS_BYTES-1:0] h_tkeep;
  logic                  h_tvalid, h_tready, h_tlast;
  // cumulative-sum stream
  logic [AXIS_W-1:0]     c_tdata;
  logic [AXIS_BYTES-1:0] c_tkeep;
  logic                  c_tvalid, c_tready, c_tlast;

  axil_split #(.N_SLV(N_SLV), .M_AW(32)) u_split (
    .clk, .rst_n,
    .s_awaddr (s_axil_awaddr),  .s_awvalid(s_axil_awvalid), .s_awready(s_axil_awready),
    .s_wdata  (s_axil_wdata),   .s_wstrb  (s_axil_wstrb),   .s_wvalid (s_axil_wvalid),
    .s_wready (s_axil_wready),  .s_bresp  (s_axil_bresp),   .s_bvalid (s_axil_bvalid),
    .s_bready (s_axil_bready),  .s_araddr (s_axil_araddr),  .s_arvalid(s_axil_arvalid),
    .s_arready(s_axil_arready), .s_rdata  (s_axil_rdata),   .s_rresp  (s_axil_rresp),
    .s_rvalid (s_axil_rvalid),  .s_rready (s_axil_rready),
    .m_awaddr (awaddr),  .m_awvalid(awvalid), .m_awready(awready),
    .m_wdata  (wdata),   .m_wstrb  (wstrb),   .m_wvalid (wvalid),  .m_wready(wready),
    .m_bresp  (bresp),   .m_bvalid (bvalid),  .m_bready (bready),
    .m_araddr (araddr),  .m_arvalid(arvalid), .m_arready(arready),
    .m_rdata  (rdata),   .m_rresp  (rresp),   .m_rvalid (rvalid),  .m_rready(rready)
  );

  makehist #(.N_BINS(N_BINS), .BIN_SIZE(BIN_SIZE)) u_makehist (
    .clk, .rst_n,
    .s_axil_awaddr (awaddr[SLV_HIST]),  .s_axil_awvalid(awvalid[SLV_HIST]),
    .s_axil_awready(awready[SLV_HIST]), .s_axil_wdata  (wdata[SLV_HIST]),
    .s_axil_wstrb  (wstrb[SLV_HIST]),   .s_axil_wvalid (wvalid[SLV_HIST]),
    .s_axil_wready (wready[SLV_HIST]),  .s_axil_bresp  (bresp[SLV_HIST]),
    .s_axil_bvalid (bvalid[SLV_HIST]),  .s_axil_bready (bready[SLV_HIST]),
    .s_axil_araddr (araddr[SLV_HIST]),  .s_axil_arvalid(arvalid[SLV_HIST]),
    .s_axil_arready(arready[SLV_HIST]), .s_axil_rdata  (rdata[SLV_HIST]),
    .s_axil_rresp  (rresp[SLV_HIST]),   .s_axil_rvalid (rvalid[SLV_HIST]),
    .s_axil_rready (rready[SLV_HIST]),
    .s_axis_tdata, .s_axis_tvalid, .s_axis_tready, .s_axis_tlast,
    .m_axis_tdata (h_tdata), .m_axis_tkeep(h_tkeep), .m_axis_tvalid(h_tvalid),
    .m_axis_tready(h_tready), .m_axis_tlast(h_tlast),
    .interrupt(interrupt[0])
  );

  cumsum u_cumsum (
    .clk, .rst_n,
    .s_axil_awaddr (awaddr[SLV_CSUM]),  .s_axil_awvalid(awvalid[SLV_CSUM]),
    .s_axil_awready(awready[SLV_CSUM]), .s_axil_wdata  (wdata[SLV_CSUM]),
    .s_axil_wstrb  (wstrb[SLV_CSUM]),   .s_axil_wvalid (wvalid[SLV_CSUM]),
    .s_axil_wready (wready[SLV_CSUM]),  .s_axil_bresp  (bresp[SLV_CSUM]),
    .s_axil_bvalid (bvalid[SLV_CSUM]),  .s_axil_bready (bready[SLV_CSUM]),
    .s_axil_araddr (araddr[SLV_CSUM]),  .s_axil_arvalid(arvalid[SLV_CSUM]),
    .s_axil_arready(arready[SLV_CSUM]), .s_axil_rdata  (rdata[SLV_CSUM]),
    .s_axil_rresp  (rresp[SLV_CSUM]),   .s_axil_rvalid (rvalid[SLV_CSUM]),
    .s_axil_rready (rready[SLV_CSUM]),
    .s_axis_tdata (h_tdata),  .s_axis_tvalid(h_tvalid), .s_axis_tready(h_tready),
    .s_axis_tlast (h_tlast),
    .m_axis_tdata (c_tdata),  .m_axis_tkeep(c_tkeep),   .m_axis_tvalid(c_tvalid),
    .m_axis_tready(c_tready), .m_axis_tlast(c_tlast),
    .interrupt(interrupt[1])
  );

  invcum #(.N_BINS(N_BINS), .BIN_SIZE(BIN_SIZE)) u_invcum (
    .clk, .rst_n,
    .s_axil_awaddr (awaddr[SLV_INV]),  .s_axil_awvalid(awvalid[SLV_INV]),
    .s_axil_awready(awready[SLV_INV]), .s_axil_wdata  (wdata[SLV_INV]),
    .s_axil_wstrb  (wstrb[SLV_INV]),   .s_axil_wvalid (wvalid[SLV_INV]),
    .s_axil_wready (wready[SLV_INV]),  .s_axil_bresp  (bresp[SLV_INV]),
    .s_axil_bvalid (bvalid[SLV_INV]),  .s_axil_bready (bready[SLV_INV]),
    .s_axil_araddr (araddr[SLV_INV]),  .s_axil_arvalid(arvalid[SLV_INV]),
    .s_axil_arready(arready[SLV_INV]), .s_axil_rdata  (rdata[SLV_INV]),
    .s_axil_rresp  (rresp[SLV_INV]),   .s_axil_rvalid (rvalid[SLV_INV]),
    .s_axil_rready (rready[SLV_INV]),
    .s_axis_tdata (c_tdata), .s_axis_tvalid(c_tvalid), .s_axis_tready(c_tready),
    .s_axis_tlast (c_tlast),
    .interrupt(interrupt[2])
  );

  // Every stream word carries four valid bytes; TKEEP is not looked at.
  logic unused_keep;
  assign unused_keep = (|h_tkeep) | (|c_tkeep);

endmodule
