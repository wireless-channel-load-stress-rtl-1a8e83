// tb_axil_slave: self-checking testbench of the AXI-Lite register port.
//
// A small register file (four words with byte-lane merging) is written here
// on the port's register side, as a stage would keep it. Random writes with
// random byte strobes and random reads go through the port, with random
// wait states on the master side, and are compared with a copy of the
// registers kept here. Also checked: each write reaches the register side
// exactly once, a read takes two cycles from the address handshake to RVALID
// being seen, responses are OKAY, and the address and data beats are taken
// only together.
module tb_axil_slave;
  import cu_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_mst_if #(.AW(AXIL_AW)) bus (clk);

  reg_wr_t            wr;
  logic               rd_en;
  logic [AXIL_AW-1:0] rd_addr;
  logic [31:0]        rd_data;
  logic [31:0]        regs [4];

  axil_slave dut (
    .clk, .rst_n,
    .s_awaddr (bus.awaddr),  .s_awvalid(bus.awvalid), .s_awready(bus.awready),
    .s_wdata  (bus.wdata),   .s_wstrb  (bus.wstrb),   .s_wvalid (bus.wvalid),
    .s_wready (bus.wready),  .s_bresp  (bus.bresp),   .s_bvalid (bus.bvalid),
    .s_bready (bus.bready),  .s_araddr (bus.araddr),  .s_arvalid(bus.arvalid),
    .s_arready(bus.arready), .s_rdata  (bus.rdata),   .s_rresp  (bus.rresp),
    .s_rvalid (bus.rvalid),  .s_rready (bus.rready),
    .wr, .rd_en, .rd_addr, .rd_data
  );

  // the register side, as a stage would keep it
  int n_wr = 0;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) regs[i] <= '0;
    end else if (wr.en) begin
      regs[wr.addr[3:2]] <= apply_strb(regs[wr.addr[3:2]], wr.data, wr.strb);
      n_wr <= n_wr + 1;
    end
  end
  assign rd_data = regs[rd_addr[3:2]];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // write beats must never be taken one without the other
  always @(posedge clk) if (rst_n && (bus.awready != bus.wready)) begin
    failures++;
    $display("FAIL: AWREADY and WREADY differ");
  end

  logic [31:0] model [4];
  logic [31:0] d;
  int          t0;
  initial begin
    bus.idle_init();
    foreach (model[i]) model[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // read latency with no master wait states
    bus.write(12'h004, 32'hCAFE_F00D);
    model[1] = 32'hCAFE_F00D;
    check(bus.bresp == RESP_OKAY, "write response not OKAY");
    @(negedge clk);
    bus.araddr = 12'h004; bus.arvalid = 1'b1; bus.rready = 1'b1;
    #1;
    check(bus.arready, "ARREADY not given at once");
    @(negedge clk);
    bus.arvalid = 1'b0;
    #1;
    check(bus.rvalid && bus.rdata == 32'hCAFE_F00D && bus.rresp == RESP_OKAY,
          "read data not valid one cycle after the address");
    @(negedge clk);
    bus.rready = 1'b0;

    bus.jitter = 1'b1;
    for (int t = 0; t < 300; t++) begin
      int unsigned idx;
      idx = $urandom_range(0, 3);
      if ($urandom_range(0, 1) != 0) begin
        logic [31:0] v;
        logic [3:0]  s;
        int          n_before;
        v = $urandom();
        s = 4'($urandom_range(1, 15));
        n_before = n_wr;
        bus.write(AXIL_AW'(idx * 4), v, s);
        model[idx] = apply_strb(model[idx], v, s);
        check(n_wr == n_before + 1, "write not seen exactly once");
      end else begin
        bus.read(AXIL_AW'(idx * 4), d);
        check(d == model[idx], $sformatf("read reg %0d = %h, want %h", idx, d, model[idx]));
      end
    end

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
