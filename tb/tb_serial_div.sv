// tb_serial_div: self-checking testbench of the bit-serial divider.
//
// Random numerators and non-zero denominators of mixed sizes, including the
// ranges the interpolation stage uses, are divided and compared with the
// simulator's own / and % operators. The latency from start to done must be
// exactly NUM_W cycles, and a start while busy must be ignored.
module tb_serial_div;

  localparam int unsigned NUM_W = 51;
  localparam int unsigned DEN_W = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             start, busy, done;
  logic [NUM_W-1:0] num, quot;
  logic [DEN_W-1:0] den, rem;

  serial_div #(.NUM_W(NUM_W), .DEN_W(DEN_W)) dut (.clk, .rst_n, .start, .num, .den, .busy, .done, .quot, .rem);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic divide(input logic [NUM_W-1:0] n, input logic [DEN_W-1:0] d);
    int cycles;
    @(negedge clk);
    num = n; den = d; start = 1'b1;
    @(negedge clk);
    num = ~n; den = d + 1; // a second start while busy must be ignored
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; start = 1'b0; end
    start = 1'b0;
    check(quot == n / NUM_W'(d), $sformatf("%0d / %0d = %0d, want %0d", n, d, quot, n / NUM_W'(d)));
    check(rem == DEN_W'(n % NUM_W'(d)), $sformatf("%0d %% %0d = %0d", n, d, rem));
    // counted from the falling edge where start is raised: one cycle before
    // the edge that takes it, then NUM_W cycles to done
    check(cycles == NUM_W + 1, $sformatf("latency %0d, want %0d", cycles, NUM_W + 1));
  endtask

  initial begin
    start = 1'b0; num = '0; den = 1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    divide(51'd1000, 32'd7);
    divide(51'd5, 32'd5);
    divide(51'd4, 32'd5);
    divide({NUM_W{1'b1}}, 32'd1);
    divide({NUM_W{1'b1}}, {DEN_W{1'b1}});
    for (int t = 0; t < 200; t++) begin
      logic [NUM_W-1:0] n;
      logic [DEN_W-1:0] d;
      n = NUM_W'({$urandom(), $urandom()});
      n = n >> $urandom_range(0, NUM_W - 1);
      d = $urandom() >> $urandom_range(0, DEN_W - 1);
      if (d == 0) d = 1;
      divide(n, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
