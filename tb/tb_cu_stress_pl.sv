// tb_cu_stress_pl: end-to-end testbench of the CU stress forecaster.
//
// Plays the processor and the DMA engine around the programmable-logic top,
// at its default parameters (20 bins of 5 % each). The processor side
// programs the three stages through the one AXI-Lite port, starts them, waits for
// the interpolation stage's interrupt and reads the percentile; the DMA side
// streams the window's samples. Every result is compared with a model
// computed here in floating point from the same samples (histogram, then
// linear interpolation of the cumulative curve), within two 16.16 LSBs.
//
// Workloads, with synthetic block-maxima CU samples (a skewed bump between
// about 40 and 95 %, as the measured data look; the measured data themselves
// are not available):
//   - a 64-sample window;
//   - a 1-hour window (3 samples a minute, 180 samples) swept over
//     p = 0.01 .. 0.99 in steps of 0.01;
//   - nine consecutive 1-hour windows (9 hours) at p = 0.8;
//   - a 20-minute window (60 samples).
// Mechanisms, each of which must happen at least once: the sample stream
// held back because the histogram stage was not started yet; the
// histogram output held back because the cumulative-sum or the interpolation
// stage was not started yet; samples above the last bin edge being dropped; a
// result clamped to the top edge; the interrupts of all three stages, and
// their clearing on read; an access to the unmapped address window.
module tb_cu_stress_pl;
  import cu_pkg::*;

  localparam int unsigned NB = N_BINS_DEF;
  localparam int unsigned BS = BIN_SIZE_DEF;
  localparam logic [31:0] HIST = 32'h0000_0000;
  localparam logic [31:0] CSUM = 32'h0000_1000;
  localparam logic [31:0] INV  = 32'h0000_2000;
  localparam logic [31:0] NONE = 32'h0000_3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_mst_if #(.AW(32)) bus (clk);

  logic [31:0] s_tdata;
  logic        s_tvalid, s_tready, s_tlast;
  logic [2:0]  irq;

  cu_stress_pl dut (
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

  // mechanism counters
  int n_in_stall = 0, n_mid_stall = 0, n_csum_stall = 0, n_dropped = 0, n_clamped = 0;
  int n_irq_hist = 0, n_irq_csum = 0, n_irq_inv = 0, n_runs = 0, n_decerr = 0;
  logic [2:0] irq_d = '0;
  always @(posedge clk) if (rst_n) begin
    if (s_tvalid && !s_tready)                          n_in_stall++;
    irq_d <= irq;
    if (irq[0] && !irq_d[0]) n_irq_hist++;
    if (irq[1] && !irq_d[1]) n_irq_csum++;
    if (irq[2] && !irq_d[2]) n_irq_inv++;
    if (bus.rvalid && bus.rready && bus.rresp == RESP_DECERR) n_decerr++;
    if (bus.bvalid && bus.bready && bus.bresp == RESP_DECERR) n_decerr++;
  end

  // DMA side: stream one window
  task automatic dma_send(input int unsigned smp[$]);
    foreach (smp[i]) begin
      s_tdata  = smp[i];
      s_tlast  = (i == smp.size() - 1);
      s_tvalid = 1'b1;
      #1;
      while (!s_tready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    s_tvalid = 1'b0;
  endtask

  // model: percentile of the window's samples
  function automatic real model(input int unsigned smp[$], input int unsigned p16);
    real h[NB];
    real pt, c_lo, c_hi;
    foreach (h[k]) h[k] = 0.0;
    foreach (smp[i]) if (smp[i] < NB * BS) h[smp[i] / BS] += 1.0;
    pt   = real'(smp.size()) * real'(p16) / 65536.0;
    c_lo = 0.0;
    for (int k = 0; k < NB; k++) begin
      c_hi = c_lo + h[k];
      if (pt < c_hi) return real'(k * BS) + (pt - c_lo) * real'(BS) / (c_hi - c_lo);
      c_lo = c_hi;
    end
    return real'(NB * BS);
  endfunction

  // order: 0 start all three then stream, 1 stream before makehist is started,
  //        2 start invcum only after the window has been streamed,
  //        3 start cumsum only after the window has been streamed
  task automatic forecast(input int unsigned smp[$], input int unsigned p16, input int order,
                          input string tag, output real est);
    logic [31:0] r, b;
    real         want;
    bus.write(HIST | 32'(REG_WINDOW), smp.size());
    bus.write(INV  | 32'(REG_WINDOW), smp.size());
    bus.write(INV  | 32'(REG_PROB), p16);
    foreach (smp[i]) if (smp[i] >= NB * BS) n_dropped++;
    case (order)
      0: begin
        bus.write(INV  | 32'(REG_CTRL), 1);
        bus.write(CSUM | 32'(REG_CTRL), 1);
        bus.write(HIST | 32'(REG_CTRL), 1);
        @(negedge clk);
        dma_send(smp);
      end
      1: begin
        bus.write(INV  | 32'(REG_CTRL), 1);
        bus.write(CSUM | 32'(REG_CTRL), 1);
        fork
          dma_send(smp);
          begin repeat (12) @(negedge clk); bus.write(HIST | 32'(REG_CTRL), 1); end
        join
      end
      2: begin
        bus.write(CSUM | 32'(REG_CTRL), 1);
        bus.write(HIST | 32'(REG_CTRL), 1);
        @(negedge clk);
        dma_send(smp);
        repeat (8) @(negedge clk);
        // the histogram cannot have been sent out yet: the
        // interpolation stage holds it back through cumsum
        if (!irq[0]) n_mid_stall++;
        check(!irq[0], $sformatf("%s: histogram stage finished before interpolation started", tag));
        bus.write(INV | 32'(REG_CTRL), 1);
      end
      default: begin
        bus.write(INV  | 32'(REG_CTRL), 1);
        bus.write(HIST | 32'(REG_CTRL), 1);
        @(negedge clk);
        dma_send(smp);
        repeat (8) @(negedge clk);
        // cumsum, not started, must hold the histogram back
        if (!irq[0] && !irq[1]) n_csum_stall++;
        check(!irq[0] && !irq[1], $sformatf("%s: histogram passed before cumsum started", tag));
        bus.write(CSUM | 32'(REG_CTRL), 1);
      end
    endcase
    while (!irq[2]) @(negedge clk);
    check(irq[0] && irq[1], $sformatf("%s: histogram or cumsum stage not done", tag));
    bus.read(HIST | 32'(REG_CTRL), r);
    check(r[1] && !irq[0], $sformatf("%s: histogram done/clear", tag));
    bus.read(CSUM | 32'(REG_CTRL), r);
    check(r[2:0] == 3'b110 && !irq[1], $sformatf("%s: cumsum done/clear", tag));
    bus.read(INV | 32'(REG_RESULT), r);
    bus.read(INV | 32'(REG_BIN), b);
    bus.read(INV | 32'(REG_CTRL), b);
    check(!irq[2], $sformatf("%s: interpolation interrupt not cleared", tag));
    bus.read(INV | 32'(REG_BIN), b);
    if (b == NB) n_clamped++;
    want = model(smp, p16);
    est  = real'(r) / 65536.0;
    check(est <= want + 1.0e-9 && est > want - 2.0 / 65536.0,
          $sformatf("%s: p=%0d/65536 estimate %f, model %f", tag, p16, est, want));
    n_runs++;
  endtask

  // synthetic block-maxima sample: skewed bump, mostly 45..90
  function automatic int unsigned cu_sample();
    int unsigned a, c;
    a = $urandom_range(0, 30) + $urandom_range(0, 30);
    c = 90 - ((a * a) / 60);
    return (c < 40) ? 40 : c;
  endfunction

  int unsigned w[$];
  real est, prev_est;
  initial begin
    bus.idle_init();
    s_tvalid = 1'b0; s_tdata = '0; s_tlast = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // 64-sample window, the two stall orders, and samples above 100 %
    w.delete();
    for (int i = 0; i < 64; i++) w.push_back(cu_sample());
    w[5] = 100; w[17] = 103;
    forecast(w, 32768, 0, "W64", est);
    forecast(w, 52429, 1, "W64-late-hist", est);
    forecast(w, 13107, 2, "W64-late-inv", est);
    forecast(w, 45875, 3, "W64-late-csum", est);
    // the unmapped window: DECERR, read as zero, nothing disturbed
    begin
      logic [31:0] r;
      bus.write(NONE | 32'(REG_WINDOW), 32'hDEAD_BEEF);
      bus.read(NONE | 32'(REG_WINDOW), r);
      check(r == '0, "unmapped window read not zero");
      bus.read(HIST | 32'(REG_WINDOW), r);
      check(r == 64, "unmapped write disturbed the histogram window");
    end
    // p = 0.99 over a window with 2 of 64 samples dropped: clamped
    forecast(w, 64880, 0, "W64-clamp", est);

    // 1-hour window, p = 0.01 .. 0.99: the estimate must not decrease
    w.delete();
    for (int i = 0; i < 180; i++) w.push_back(cu_sample());
    prev_est = 0.0;
    for (int pc = 1; pc <= 99; pc++) begin
      forecast(w, (pc * 65536) / 100, pc % 4, $sformatf("SWEEP p=0.%02d", pc), est);
      check(est >= prev_est, $sformatf("SWEEP p=0.%02d: estimate fell", pc));
      prev_est = est;
    end

    // nine 1-hour windows at p = 0.8
    for (int hr = 0; hr < 9; hr++) begin
      w.delete();
      for (int i = 0; i < 180; i++) w.push_back(cu_sample());
      forecast(w, 52429, 0, $sformatf("HOUR%0d", hr), est);
    end

    // 20-minute window
    w.delete();
    for (int i = 0; i < 60; i++) w.push_back(cu_sample());
    forecast(w, 52429, 0, "W60", est);

    $display("mechanisms: input stalls %0d, held by invcum %0d, held by cumsum %0d, dropped %0d, clamped %0d, irq hist %0d, irq cumsum %0d, irq inv %0d, DECERR %0d, runs %0d",
             n_in_stall, n_mid_stall, n_csum_stall, n_dropped, n_clamped, n_irq_hist, n_irq_csum,
             n_irq_inv, n_decerr, n_runs);
    check(n_in_stall > 0,   "input stream never held back");
    check(n_mid_stall > 0,  "histogram output never held back by invcum");
    check(n_csum_stall > 0, "histogram output never held back by cumsum");
    check(n_decerr == 2,    "unmapped window not answered with DECERR twice");
    check(n_dropped > 0,   "no sample dropped");
    check(n_clamped > 0,   "no clamped result");
    check(n_irq_hist == n_runs && n_irq_csum == n_runs && n_irq_inv == n_runs, "interrupt count");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
