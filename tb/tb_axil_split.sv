// tb_axil_split: self-checking testbench of the AXI-Lite address decoder.
//
// Three register windows sit behind the decoder (its default), each an
// axil_slave with four words kept here. Random writes and reads to random
// windows and words, with random master wait states, are compared with a copy
// of all twelve words. Addresses are given random high bits, which the
// decoder must ignore, so a write meant for one window must never show up in
// another. The fourth window number leads nowhere: transfers there must be
// answered with DECERR, read as zero and change no register. Also checked: a
// read through the decoder costs exactly one cycle more than a direct read.
module tb_axil_split;
  import cu_pkg::*;

  localparam int unsigned NS = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_mst_if #(.AW(32)) bus (clk);

  logic [AXIL_AW-1:0]   awaddr  [NS];
  logic [NS-1:0]        awvalid, awready;
  logic [AXIL_DW-1:0]   wdata   [NS];
  logic [AXIL_DW/8-1:0] wstrb   [NS];
  logic [NS-1:0]        wvalid, wready;
  logic [1:0]           bresp   [NS];
  logic [NS-1:0]        bvalid, bready;
  logic [AXIL_AW-1:0]   araddr  [NS];
  logic [NS-1:0]        arvalid, arready;
  logic [AXIL_DW-1:0]   rdata   [NS];
  logic [1:0]           rresp   [NS];
  logic [NS-1:0]        rvalid, rready;

  axil_split dut (
    .clk, .rst_n,
    .s_awaddr (bus.awaddr),  .s_awvalid(bus.awvalid), .s_awready(bus.awready),
    .s_wdata  (bus.wdata),   .s_wstrb  (bus.wstrb),   .s_wvalid (bus.wvalid),
    .s_wready (bus.wready),  .s_bresp  (bus.bresp),   .s_bvalid (bus.bvalid),
    .s_bready (bus.bready),  .s_araddr (bus.araddr),  .s_arvalid(bus.arvalid),
    .s_arready(bus.arready), .s_rdata  (bus.rdata),   .s_rresp  (bus.rresp),
    .s_rvalid (bus.rvalid),  .s_rready (bus.rready),
    .m_awaddr (awaddr),  .m_awvalid(awvalid), .m_awready(awready),
    .m_wdata  (wdata),   .m_wstrb  (wstrb),   .m_wvalid (wvalid),  .m_wready(wready),
    .m_bresp  (bresp),   .m_bvalid (bvalid),  .m_bready (bready),
    .m_araddr (araddr),  .m_arvalid(arvalid), .m_arready(arready),
    .m_rdata  (rdata),   .m_rresp  (rresp),   .m_rvalid (rvalid),  .m_rready(rready)
  );

  logic [31:0] regs [NS][4];

  for (genvar s = 0; s < NS; s++) begin : g_slv
    reg_wr_t            wr;
    logic               rd_en;
    logic [AXIL_AW-1:0] rd_addr;
    axil_slave u_slv (
      .clk, .rst_n,
      .s_awaddr (awaddr[s]),  .s_awvalid(awvalid[s]), .s_awready(awready[s]),
      .s_wdata  (wdata[s]),   .s_wstrb  (wstrb[s]),   .s_wvalid (wvalid[s]),
      .s_wready (wready[s]),  .s_bresp  (bresp[s]),   .s_bvalid (bvalid[s]),
      .s_bready (bready[s]),  .s_araddr (araddr[s]),  .s_arvalid(arvalid[s]),
      .s_arready(arready[s]), .s_rdata  (rdata[s]),   .s_rresp  (rresp[s]),
      .s_rvalid (rvalid[s]),  .s_rready (rready[s]),
      .wr, .rd_en, .rd_addr, .rd_data(regs[s][rd_addr[3:2]])
    );
    always_ff @(posedge clk) begin
      if (!rst_n) for (int i = 0; i < 4; i++) regs[s][i] <= '0;
      else if (wr.en) regs[s][wr.addr[3:2]] <= apply_strb(regs[s][wr.addr[3:2]], wr.data, wr.strb);
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] addr_of(input int unsigned s, input int unsigned i);
    logic [31:0] a;
    a = $urandom() & ~32'h0000_3FFF;            // random high bits, ignored
    a[AXIL_AW +: 2] = s[1:0];
    a[3:2] = i[1:0];
    return a;
  endfunction

  logic [31:0] model [NS][4];
  logic [31:0] d;
  int          cyc = 0, t_ar = 0, t_r = 0, n_unmapped = 0;
  logic [1:0]  last_rresp = '0, last_bresp = '0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (bus.arvalid && bus.arready) t_ar <= cyc;
    if (bus.rvalid && bus.rready) begin
      t_r        <= cyc;
      last_rresp <= bus.rresp;
    end
    if (bus.bvalid && bus.bready) last_bresp <= bus.bresp;
  end

  initial begin
    bus.idle_init();
    foreach (model[s, i]) model[s][i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    bus.write(32'h0000_1008, 32'h1234_5678);
    model[1][2] = 32'h1234_5678;
    bus.read(32'h0000_1008, d);
    check(d == 32'h1234_5678, "first read back");
    check(t_r - t_ar == 2, $sformatf("read handshake to data %0d cycles, want 2 (1 direct + 1)", t_r - t_ar));

    bus.jitter = 1'b1;
    for (int t = 0; t < 400; t++) begin
      int unsigned s, i;
      s = ($urandom_range(0, 9) == 0) ? NS : $urandom_range(0, NS - 1);
      i = $urandom_range(0, 3);
      if ($urandom_range(0, 1) != 0) begin
        logic [31:0] v;
        v = $urandom();
        bus.write(addr_of(s, i), v);
        @(negedge clk);
        if (s < NS) begin
          model[s][i] = v;
          check(last_bresp == RESP_OKAY, "write response not OKAY");
        end else begin
          n_unmapped++;
          check(last_bresp == RESP_DECERR, "unmapped write not answered with DECERR");
        end
      end else begin
        bus.read(addr_of(s, i), d);
        @(negedge clk);
        if (s < NS) begin
          check(d == model[s][i], $sformatf("read window %0d word %0d = %h, want %h", s, i, d, model[s][i]));
          check(last_rresp == RESP_OKAY, "read response not OKAY");
        end else begin
          n_unmapped++;
          check(d == '0 && last_rresp == RESP_DECERR, "unmapped read not zero with DECERR");
        end
      end
    end
    foreach (model[s, i]) check(regs[s][i] == model[s][i], $sformatf("final window %0d word %0d", s, i));
    check(n_unmapped > 0, "no transfer to the unmapped window happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
