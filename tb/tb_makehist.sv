// tb_makehist: self-checking testbench of the histogram stage.
//
// Runs windows of random CU samples (0..104, so some fall beyond the last bin
// edge and must be dropped) through makehist and compares the streamed bin
// counts with a histogram counted here by integer division. Covered: the
// 64-sample window with unstalled streams and its exact cycle count
// (W + 1 + N_BINS from the first sample taken to `done`, and no more than the
// 288-cycle latency bound of the reference implementation), a 180-sample
// window with random input gaps and output back-pressure, a short window that
// shows the counters were cleared, samples on the bin edges, TLAST only on
// the last bin, the window register read-back and the clear-on-read done bit.
module tb_makehist;
  import cu_pkg::*;

  localparam int unsigned NB = N_BINS_DEF;
  localparam int unsigned BS = BIN_SIZE_DEF;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_mst_if #(.AW(AXIL_AW)) bus (clk);

  logic [31:0] s_tdata;
  logic        s_tvalid, s_tready, s_tlast;
  logic [31:0] m_tdata;
  logic [3:0]  m_tkeep;
  logic        m_tvalid, m_tready, m_tlast;
  logic        irq;

  makehist dut (
    .clk, .rst_n,
    .s_axil_awaddr (bus.awaddr),  .s_axil_awvalid(bus.awvalid), .s_axil_awready(bus.awready),
    .s_axil_wdata  (bus.wdata),   .s_axil_wstrb  (bus.wstrb),   .s_axil_wvalid (bus.wvalid),
    .s_axil_wready (bus.wready),  .s_axil_bresp  (bus.bresp),   .s_axil_bvalid (bus.bvalid),
    .s_axil_bready (bus.bready),  .s_axil_araddr (bus.araddr),  .s_axil_arvalid(bus.arvalid),
    .s_axil_arready(bus.arready), .s_axil_rdata  (bus.rdata),   .s_axil_rresp  (bus.rresp),
    .s_axil_rvalid (bus.rvalid),  .s_axil_rready (bus.rready),
    .s_axis_tdata (s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready),
    .s_axis_tlast (s_tlast),
    .m_axis_tdata (m_tdata), .m_axis_tkeep(m_tkeep), .m_axis_tvalid(m_tvalid),
    .m_axis_tready(m_tready), .m_axis_tlast(m_tlast),
    .interrupt(irq)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // cycle counter; time stamps of the first sample taken and of `done`
  int cyc = 0, t_start = 0, t_done = 0;
  bit armed = 1'b0;
  logic irq_d = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (s_tvalid && s_tready && armed) begin t_start <= cyc; armed <= 1'b0; end
    irq_d <= irq;
    if (irq && !irq_d) t_done <= cyc;
  end

  // output sink
  bit          backpressure = 1'b0;
  logic [31:0] got[$];
  bit          got_last[$];
  always @(negedge clk) m_tready <= backpressure ? ($urandom_range(0, 2) != 0) : 1'b1;
  always @(posedge clk) if (m_tvalid && m_tready) begin
    got.push_back(m_tdata);
    got_last.push_back(m_tlast);
  end

  // input source
  bit gaps = 1'b0;
  task automatic send(input logic [31:0] smp[$]);
    foreach (smp[i]) begin
      if (gaps) begin
        s_tvalid = 1'b0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      s_tdata  = smp[i];
      s_tlast  = (i == smp.size() - 1);
      s_tvalid = 1'b1;
      #1;
      while (!s_tready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    s_tvalid = 1'b0;
  endtask

  task automatic run_window(input logic [31:0] smp[$], input string tag);
    int unsigned ref_h[NB];
    logic [31:0] r;
    foreach (ref_h[i]) ref_h[i] = 0;
    foreach (smp[i]) if (smp[i] < NB * BS) ref_h[smp[i] / BS]++;
    got.delete();
    got_last.delete();
    bus.write(REG_WINDOW, smp.size());
    bus.read(REG_WINDOW, r);
    check(r == smp.size(), $sformatf("%s: window register reads %0d", tag, r));
    bus.write(REG_CTRL, 32'h1);
    armed = 1'b1;
    @(negedge clk);
    send(smp);
    while (!irq) @(negedge clk);
    repeat (2) @(negedge clk);
    check(got.size() == NB, $sformatf("%s: %0d words out, want %0d", tag, got.size(), NB));
    for (int i = 0; i < NB && i < got.size(); i++) begin
      check(got[i] == ref_h[i], $sformatf("%s: bin %0d = %0d, want %0d", tag, i, got[i], ref_h[i]));
      check(got_last[i] == (i == NB - 1), $sformatf("%s: TLAST on word %0d", tag, i));
    end
    bus.read(REG_CTRL, r);
    check(r[1] == 1'b1 && r[2] == 1'b1 && r[0] == 1'b0, $sformatf("%s: ctrl after run %b", tag, r[2:0]));
    bus.read(REG_CTRL, r);
    check(r[1] == 1'b0 && !irq, $sformatf("%s: done not cleared by read", tag));
  endtask

  logic [31:0] w[$];
  initial begin
    bus.idle_init();
    s_tvalid = 1'b0; s_tdata = '0; s_tlast = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // 64-sample window, no stalls: exact latency
    w.delete();
    for (int i = 0; i < 64; i++) w.push_back($urandom_range(0, 104));
    run_window(w, "W64");
    check(t_done - t_start == 64 + 1 + NB,
          $sformatf("W64: first-sample-to-done %0d cycles, want %0d", t_done - t_start, 64 + 1 + NB));
    check(t_done - t_start <= 288, "W64: latency above 288 cycles");

    // 1-hour window (180 samples) with gaps and back-pressure
    gaps = 1'b1; backpressure = 1'b1; bus.jitter = 1'b1;
    w.delete();
    for (int i = 0; i < 180; i++) w.push_back($urandom_range(0, 104));
    run_window(w, "W180");

    // short window: counters must start from zero again; edge values
    w.delete();
    w.push_back(0); w.push_back(4); w.push_back(5); w.push_back(99);
    w.push_back(100); w.push_back(32'hFFFF_FFFF); w.push_back(50);
    run_window(w, "EDGES");

    // heavy single bin
    w.delete();
    for (int i = 0; i < 40; i++) w.push_back(72);
    run_window(w, "ONEBIN");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
