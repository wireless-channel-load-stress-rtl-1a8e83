// axil_slave: AXI-Lite register port of one processing stage.
//
// The processor configures each stage and reads its result over AXI-Lite:
// single-beat 32-bit reads and writes to a small register window. This module
// speaks the bus side and turns each transfer into a one-cycle register access
// for the owning stage, which keeps its own registers and decodes addresses.
//
// Write: the address and data beats are taken together, in the cycle both
// AWVALID and WVALID are high and no response is pending (AWREADY and WREADY
// are raised in that cycle). The stage sees `wr.en` for that one cycle; BVALID
// (OKAY) follows one cycle later and is held until BREADY.
// Read: ARREADY is raised in the cycle ARVALID is high and no read data is
// pending; `rd_en`/`rd_addr` are valid in that cycle and the stage must drive
// `rd_data` combinationally from them. RDATA is registered and RVALID is held
// until RREADY, so a read costs two cycles.
//
// The bus follows the AXI-Lite rules the source design relies on; the single
// outstanding transfer per direction and the taking of AW and W together are
// this design's choices. Reads and writes can proceed at the same time.
module axil_slave
  import cu_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // AXI-Lite slave
  input  logic [AXIL_AW-1:0]   s_awaddr,
  input  logic                 s_awvalid,
  output logic                 s_awready,
  input  logic [AXIL_DW-1:0]   s_wdata,
  input  logic [AXIL_DW/8-1:0] s_wstrb,
  input  logic                 s_wvalid,
  output logic                 s_wready,
  output logic [1:0]           s_bresp,
  output logic                 s_bvalid,
  input  logic                 s_bready,
  input  logic [AXIL_AW-1:0]   s_araddr,
  input  logic                 s_arvalid,
  output logic                 s_arready,
  output logic [AXIL_DW-1:0]   s_rdata,
  output logic [1:0]           s_rresp,
  output logic                 s_rvalid,
  input  logic                 s_rready,
  // register side
  output reg_wr_t              wr,
  output logic                 rd_en,
  output logic [AXIL_AW-1:0]   rd_addr,
  input  logic [AXIL_DW-1:0]   rd_data
);

  logic wr_take, rd_take;

  assign wr_take   = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = wr_take;
  assign s_wready  = wr_take;

  assign rd_take   = s_arvalid && !s_rvalid;
  assign s_arready = rd_take;

  always_comb begin
    wr.en   = wr_take;
    wr.addr = s_awaddr;
    wr.data = s_wdata;
    wr.strb = s_wstrb;
  end

  assign rd_en   = rd_take;
  assign rd_addr = s_araddr;

  assign s_bresp = RESP_OKAY;
  assign s_rresp = RESP_OKAY;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_bvalid <= 1'b0;
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (wr_take)                 s_bvalid <= 1'b1;
      else if (s_bready)           s_bvalid <= 1'b0;
      if (rd_take) begin
        s_rvalid <= 1'b1;
        s_rdata  <= rd_data;
      end else if (s_rready) begin
        s_rvalid <= 1'b0;
      end
    end
  end

  // A response, once offered, stays until it is taken.
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             s_bvalid && !s_bready |=> s_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

endmodule
