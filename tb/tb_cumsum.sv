// tb_cumsum: self-checking testbench of the running-sum stage.
//
// Streams histograms of random bin counts through cumsum, with and without
// random input gaps and output back-pressure, and compares every output word
// with a running sum formed here, restarted after each TLAST. It also checks
// that TLAST is passed on with the last word, and that an unstalled 20-bin
// histogram goes through in N_BINS + 1 cycles (first word in to last word
// out), within the 35-cycle latency of the reference implementation.
// Each histogram is started over the AXI-Lite control port; in some runs the
// histogram is offered before the start, and the stage must hold it back
// until then. After each run the done bit, its interrupt and its clearing
// by a read of the control register are checked.
module tb_cumsum;
  import cu_pkg::*;

  localparam int unsigned NB = N_BINS_DEF;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] s_tdata, m_tdata;
  logic [3:0]  m_tkeep;
  logic        s_tvalid, s_tready, s_tlast, m_tvalid, m_tready, m_tlast;

  axil_mst_if #(.AW(AXIL_AW)) bus (clk);
  logic irq;

  cumsum dut (
    .clk, .rst_n,
    .s_axil_awaddr (bus.awaddr),  .s_axil_awvalid(bus.awvalid), .s_axil_awready(bus.awready),
    .s_axil_wdata  (bus.wdata),   .s_axil_wstrb  (bus.wstrb),   .s_axil_wvalid (bus.wvalid),
    .s_axil_wready (bus.wready),  .s_axil_bresp  (bus.bresp),   .s_axil_bvalid (bus.bvalid),
    .s_axil_bready (bus.bready),  .s_axil_araddr (bus.araddr),  .s_axil_arvalid(bus.arvalid),
    .s_axil_arready(bus.arready), .s_axil_rdata  (bus.rdata),   .s_axil_rresp  (bus.rresp),
    .s_axil_rvalid (bus.rvalid),  .s_axil_rready (bus.rready),
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready), .s_axis_tlast(s_tlast),
    .m_axis_tdata(m_tdata), .m_axis_tkeep(m_tkeep), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready),
    .m_axis_tlast(m_tlast), .interrupt(irq)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  bit          backpressure = 1'b0, gaps = 1'b0;
  logic [31:0] got[$];
  bit          got_last[$];
  int          cyc = 0, t_first_in = -1, t_last_out = -1;
  always @(negedge clk) m_tready <= backpressure ? ($urandom_range(0, 2) != 0) : 1'b1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (s_tvalid && s_tready && t_first_in < 0) t_first_in <= cyc;
    if (m_tvalid && m_tready) begin
      got.push_back(m_tdata);
      got_last.push_back(m_tlast);
      if (m_tlast) t_last_out <= cyc;
    end
  end

  task automatic send(input logic [31:0] h[$]);
    foreach (h[i]) begin
      if (gaps) begin
        s_tvalid = 1'b0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      s_tdata  = h[i];
      s_tlast  = (i == h.size() - 1);
      s_tvalid = 1'b1;
      #1;
      while (!s_tready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    s_tvalid = 1'b0;
  endtask

  task automatic run_hist(input string tag, input int unsigned maxv, input bit late_start = 1'b0);
    logic [31:0] h[$];
    logic [31:0] acc, r;
    got.delete(); got_last.delete();
    t_first_in = -1; t_last_out = -1;
    for (int i = 0; i < NB; i++) h.push_back($urandom_range(0, maxv));
    if (late_start) begin
      fork
        send(h);
        begin
          repeat (10) @(negedge clk);
          check(!s_tready && got.size() == 0 && t_first_in < 0,
                $sformatf("%s: data taken before start", tag));
          bus.write(REG_CTRL, 32'h1);
        end
      join
    end else begin
      bus.write(REG_CTRL, 32'h1);
      send(h);
    end
    repeat (4) @(negedge clk);
    check(irq, $sformatf("%s: no interrupt after TLAST", tag));
    bus.read(REG_CTRL, r);
    check(r[2:0] == 3'b110, $sformatf("%s: ctrl after run %b, want idle+done", tag, r[2:0]));
    bus.read(REG_CTRL, r);
    check(r[1] == 1'b0 && !irq, $sformatf("%s: done not cleared by read", tag));
    while (got.size() < NB && cyc < 100000) @(negedge clk);
    check(got.size() == NB, $sformatf("%s: %0d words out", tag, got.size()));
    acc = 0;
    for (int i = 0; i < NB && i < got.size(); i++) begin
      acc += h[i];
      check(got[i] == acc, $sformatf("%s: word %0d = %0d, want %0d", tag, i, got[i], acc));
      check(got_last[i] == (i == NB - 1), $sformatf("%s: TLAST on word %0d", tag, i));
    end
  endtask

  initial begin
    bus.idle_init();
    s_tvalid = 1'b0; s_tdata = '0; s_tlast = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    run_hist("FAST", 20);
    check(t_last_out - t_first_in == NB, $sformatf("FAST: %0d cycles first-in to last-out, want %0d",
                                                  t_last_out - t_first_in, NB));
    check(t_last_out - t_first_in + 1 <= 35, "FAST: above 35 cycles");
    run_hist("AGAIN", 1000, 1'b1);         // sum restarts after TLAST; early data
    gaps = 1'b1; backpressure = 1'b1; bus.jitter = 1'b1;
    for (int k = 0; k < 5; k++) run_hist($sformatf("STALL%0d", k), 200, k[0]);

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
