// tb_invcum: self-checking testbench of the percentile-estimation stage.
//
// Feeds invcum the cumulative sums of histograms and checks the percentile it
// returns. Expected values are worked out here in floating point, by walking
// the piecewise-linear cumulative curve through (k*BIN_SIZE, c_k) with
// c_0 = 0, and compared with the 16.16 result within one least significant
// bit of truncation. Hand-worked cases come first: all samples in one bin
// (p = 0.5 must land in the middle of that bin), P exactly on a cumulative
// value, and a window whose samples partly fell outside the bins so that a
// high p is clamped to the top edge. Then random windows of 64 and 180
// samples with probabilities from 0.01 to 0.99, a stream that arrives before
// the stage is started (back-pressure), and the cycle count from the first
// stream word to `done` (N_BINS + DIV_W + 3, inside the 102-cycle latency of
// the reference implementation).
module tb_invcum;
  import cu_pkg::*;

  localparam int unsigned NB = N_BINS_DEF;
  localparam int unsigned BS = BIN_SIZE_DEF;
  localparam int unsigned DIV_W = 32 + PROB_FRAC + $clog2(BS + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_mst_if #(.AW(AXIL_AW)) bus (clk);

  logic [31:0] s_tdata;
  logic        s_tvalid, s_tready, s_tlast;
  logic        irq;

  invcum dut (
    .clk, .rst_n,
    .s_axil_awaddr (bus.awaddr),  .s_axil_awvalid(bus.awvalid), .s_axil_awready(bus.awready),
    .s_axil_wdata  (bus.wdata),   .s_axil_wstrb  (bus.wstrb),   .s_axil_wvalid (bus.wvalid),
    .s_axil_wready (bus.wready),  .s_axil_bresp  (bus.bresp),   .s_axil_bvalid (bus.bvalid),
    .s_axil_bready (bus.bready),  .s_axil_araddr (bus.araddr),  .s_axil_arvalid(bus.arvalid),
    .s_axil_arready(bus.arready), .s_axil_rdata  (bus.rdata),   .s_axil_rresp  (bus.rresp),
    .s_axil_rvalid (bus.rvalid),  .s_axil_rready (bus.rready),
    .s_axis_tdata (s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready),
    .s_axis_tlast (s_tlast),
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

  int cyc = 0, t_first = 0, t_done = 0;
  bit armed = 1'b0;
  logic irq_d = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (s_tvalid && s_tready && armed) begin t_first <= cyc; armed <= 1'b0; end
    irq_d <= irq;
    if (irq && !irq_d) t_done <= cyc;
  end

  task automatic send(input logic [31:0] c[$]);
    foreach (c[i]) begin
      s_tdata  = c[i];
      s_tlast  = (i == c.size() - 1);
      s_tvalid = 1'b1;
      #1;
      while (!s_tready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    s_tvalid = 1'b0;
  endtask

  // Expected percentile in units of the CU value, from the bin counts h.
  function automatic real model(input int unsigned h[NB], input int unsigned n, input int unsigned p16);
    real pt, c_lo, c_hi;
    pt   = real'(n) * real'(p16) / 65536.0;
    c_lo = 0.0;
    for (int k = 0; k < NB; k++) begin
      c_hi = c_lo + real'(h[k]);
      if (pt < c_hi) return real'(k * BS) + (pt - c_lo) * real'(BS) / (c_hi - c_lo);
      c_lo = c_hi;
    end
    return real'(NB * BS);
  endfunction

  // One run: program n and p, stream the cumulative sums, check the result.
  task automatic run(input int unsigned h[NB], input int unsigned n, input int unsigned p16,
                     input string tag, input bit stream_first = 1'b0);
    logic [31:0] c[$];
    logic [31:0] acc, r, b;
    real         want, got;
    acc = 0;
    for (int k = 0; k < NB; k++) begin acc += h[k]; c.push_back(acc); end
    bus.write(REG_WINDOW, n);
    bus.write(REG_PROB, p16);
    armed = 1'b1;
    if (stream_first) begin
      fork
        send(c);
        begin repeat (30) @(negedge clk); bus.write(REG_CTRL, 32'h1); end
      join
    end else begin
      bus.write(REG_CTRL, 32'h1);
      @(negedge clk);
      send(c);
    end
    while (!irq) @(negedge clk);
    bus.read(REG_RESULT, r);
    bus.read(REG_BIN, b);
    bus.read(REG_CTRL, acc);
    check(acc[1] == 1'b1, $sformatf("%s: done bit not set", tag));
    want = model(h, n, p16);
    got  = real'(r) / 65536.0;
    check(got <= want + 1.0e-9 && got > want - 2.0 / 65536.0,
          $sformatf("%s: p=%0d/65536 result %f, want %f", tag, p16, got, want));
    check(int'(b) == ((want >= real'(NB * BS)) ? NB : int'($floor(want / BS))) ||
          (want == real'(b * BS)),
          $sformatf("%s: interval %0d for %f", tag, b, want));
  endtask

  int unsigned h[NB];
  int unsigned n;
  logic [31:0] r;
  initial begin
    bus.idle_init();
    s_tvalid = 1'b0; s_tdata = '0; s_tlast = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // all 100 samples in bin 14 (70..75): p = 0.5 -> 72.5 exactly
    foreach (h[i]) h[i] = 0;
    h[14] = 100;
    run(h, 100, 32768, "ONEBIN");
    bus.read(REG_RESULT, r);
    check(r == 32'h0048_8000, $sformatf("ONEBIN: result %h, want 00488000", r));
    check(t_done - t_first == NB + DIV_W + 3,
          $sformatf("ONEBIN: first-word-to-done %0d cycles, want %0d", t_done - t_first, NB + DIV_W + 3));
    check(t_done - t_first <= 102, "ONEBIN: above 102 cycles");

    // P exactly on a cumulative value: 50 in bin 2, 50 in bin 3, p = 0.5 -> 15.0
    foreach (h[i]) h[i] = 0;
    h[2] = 50; h[3] = 50;
    run(h, 100, 32768, "ONEDGE");
    bus.read(REG_RESULT, r);
    check(r == 32'h000F_0000, $sformatf("ONEDGE: result %h, want 000F0000", r));

    // 10 of 100 samples outside the bins, p = 0.95 -> clamped to 100.0
    foreach (h[i]) h[i] = 0;
    h[10] = 90;
    run(h, 100, 62259, "CLAMP");
    bus.read(REG_RESULT, r);
    check(r == 32'h0064_0000, $sformatf("CLAMP: result %h, want 00640000", r));

    // stream arrives before the start: held back until started
    foreach (h[i]) h[i] = $urandom_range(0, 6);
    n = 0; foreach (h[i]) n += h[i];
    run(h, n, 45000, "EARLY", 1'b1);

    // random windows, probabilities 0.01 .. 0.99
    bus.jitter = 1'b1;
    for (int t = 0; t < 30; t++) begin
      int unsigned target;
      target = (t % 2 != 0) ? 180 : 64;
      foreach (h[i]) h[i] = 0;
      for (int s = 0; s < target; s++) h[$urandom_range(8, 17)]++;
      run(h, target, $urandom_range(655, 64880), $sformatf("RND%0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
