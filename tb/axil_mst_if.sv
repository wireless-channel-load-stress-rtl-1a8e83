// axil_mst_if: AXI-Lite master signals plus the tasks that drive them, for
// the testbenches.
//
// Inputs of the device are changed just after a falling clock edge and its
// outputs are looked at one time unit later, so every handshake completes on
// the following rising edge. With `jitter` set, random idle cycles are put
// before each beat and before each response is accepted, so the device's
// wait states and held responses are exercised.
interface axil_mst_if #(parameter int unsigned AW = 32) (input logic clk);

  logic [AW-1:0] awaddr;
  logic          awvalid, awready;
  logic [31:0]   wdata;
  logic [3:0]    wstrb;
  logic          wvalid, wready;
  logic [1:0]    bresp;
  logic          bvalid, bready;
  logic [AW-1:0] araddr;
  logic          arvalid, arready;
  logic [31:0]   rdata;
  logic [1:0]    rresp;
  logic          rvalid, rready;

  bit jitter = 1'b0;

  task automatic idle_init();
    awaddr = '0; awvalid = 1'b0; wdata = '0; wstrb = '0; wvalid = 1'b0; bready = 1'b0;
    araddr = '0; arvalid = 1'b0; rready = 1'b0;
  endtask

  task automatic pause();
    if (jitter) repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  task automatic write(input logic [AW-1:0] a, input logic [31:0] d,
                       input logic [3:0] s = 4'hF);
    pause();
    @(negedge clk);
    awaddr  = a;  wdata = d;  wstrb = s;
    awvalid = 1'b1; wvalid = 1'b1;
    #1;
    while (!(awready && wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
    pause();
    bready = 1'b1;
    #1;
    while (!bvalid) begin @(negedge clk); #1; end
    @(negedge clk);
    bready = 1'b0;
  endtask

  task automatic read(input logic [AW-1:0] a, output logic [31:0] d);
    pause();
    @(negedge clk);
    araddr  = a; arvalid = 1'b1;
    #1;
    while (!arready) begin @(negedge clk); #1; end
    @(negedge clk);
    arvalid = 1'b0;
    pause();
    rready = 1'b1;
    #1;
    while (!rvalid) begin @(negedge clk); #1; end
    d = rdata;
    @(negedge clk);
    rready = 1'b0;
  endtask

endinterface
