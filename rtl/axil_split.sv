// axil_split: AXI-Lite interconnect from the processor to the stages'
// control ports.
//
// One AXI-Lite master port fans out to N_SLV register windows of 2**AXIL_AW
// bytes each; address bits [AXIL_AW +: SEL_W] choose the window (higher bits
// are ignored, so the windows repeat through the address space) and the low
// AXIL_AW bits are passed on. When N_SLV is not a power of two, the window
// numbers from N_SLV up lead nowhere: a transfer there is answered here with
// DECERR (read data zero) and reaches no port. One write and one read may be
// in flight at a time, independently of each other.
//
// A write takes its address and data beats together from the master, then
// presents them to the chosen port (each beat until that port accepts it),
// then hands the port's write response back. A read is handled the same way
// with the address and data channels. All outputs come from registers or the
// chosen port, never from the ready signal they wait for, as AXI requires.
// Timing: a write costs 2 cycles more than the port itself takes, a read 1;
// an unmapped transfer is answered 1 cycle after its address is taken.
//
// The source design uses the vendor's AXI interconnect here and says only
// that it joins the processor to the stages' control ports; this fixed
// address decoder is the simplest circuit that does that job.
module axil_split
  import cu_pkg::*;
#(
  parameter int unsigned N_SLV = 3,
  parameter int unsigned M_AW  = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // from the processor
  input  logic [M_AW-1:0]      s_awaddr,
  input  logic                 s_awvalid,
  output logic                 s_awready,
  input  logic [AXIL_DW-1:0]   s_wdata,
  input  logic [AXIL_DW/8-1:0] s_wstrb,
  input  logic                 s_wvalid,
  output logic                 s_wready,
  output logic [1:0]           s_bresp,
  output logic                 s_bvalid,
  input  logic                 s_bready,
  input  logic [M_AW-1:0]      s_araddr,
  input  logic                 s_arvalid,
  output logic                 s_arready,
  output logic [AXIL_DW-1:0]   s_rdata,
  output logic [1:0]           s_rresp,
  output logic                 s_rvalid,
  input  logic                 s_rready,
  // to the register windows
  output logic [AXIL_AW-1:0]   m_awaddr  [N_SLV],
  output logic [N_SLV-1:0]     m_awvalid,
  input  logic [N_SLV-1:0]     m_awready,
  output logic [AXIL_DW-1:0]   m_wdata   [N_SLV],
  output logic [AXIL_DW/8-1:0] m_wstrb   [N_SLV],
  output logic [N_SLV-1:0]     m_wvalid,
  input  logic [N_SLV-1:0]     m_wready,
  input  logic [1:0]           m_bresp   [N_SLV],
  input  logic [N_SLV-1:0]     m_bvalid,
  output logic [N_SLV-1:0]     m_bready,
  output logic [AXIL_AW-1:0]   m_araddr  [N_SLV],
  output logic [N_SLV-1:0]     m_arvalid,
  input  logic [N_SLV-1:0]     m_arready,
  input  logic [AXIL_DW-1:0]   m_rdata   [N_SLV],
  input  logic [1:0]           m_rresp   [N_SLV],
  input  logic [N_SLV-1:0]     m_rvalid,
  output logic [N_SLV-1:0]     m_rready
);

  localparam int unsigned SEL_W = (N_SLV > 1) ? $clog2(N_SLV) : 1;

  typedef enum logic [1:0] {X_IDLE, X_REQ, X_RESP} xfer_e;

  // Does a window number lead to a port?
  function automatic logic mapped(input logic [SEL_W-1:0] sel);
    return 32'(sel) < N_SLV;
  endfunction

  xfer_e                w_state, r_state;
  logic [SEL_W-1:0]     w_sel, r_sel;
  logic                 w_err, r_err;      // transfer to an unmapped window
  logic [AXIL_AW-1:0]   w_addr, r_addr;
  logic [AXIL_DW-1:0]   w_data;
  logic [AXIL_DW/8-1:0] w_strb;
  logic                 aw_pend, w_pend;   // beats not yet accepted by the port

  // ---------------- write path ----------------
  assign s_awready = (w_state == X_IDLE) && s_awvalid && s_wvalid;
  assign s_wready  = s_awready;

  always_comb begin
    for (int i = 0; i < N_SLV; i++) begin
      m_awaddr[i]  = w_addr;
      m_wdata[i]   = w_data;
      m_wstrb[i]   = w_strb;
      m_awvalid[i] = (w_state == X_REQ) && aw_pend && (w_sel == SEL_W'(i));
      m_wvalid[i]  = (w_state == X_REQ) && w_pend  && (w_sel == SEL_W'(i));
      m_bready[i]  = (w_state == X_RESP) && s_bready && (w_sel == SEL_W'(i));
    end
  end

  assign s_bvalid = (w_state == X_RESP) && (w_err || m_bvalid[w_sel]);
  assign s_bresp  = w_err ? 2'(RESP_DECERR) : m_bresp[w_sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_state <= X_IDLE;
      w_sel   <= '0;
      w_err   <= 1'b0;
      w_addr  <= '0;
      w_data  <= '0;
      w_strb  <= '0;
      aw_pend <= 1'b0;
      w_pend  <= 1'b0;
    end else begin
      unique case (w_state)
        X_IDLE: if (s_awready) begin
          w_err   <= !mapped(s_awaddr[AXIL_AW +: SEL_W]);
          w_sel   <= mapped(s_awaddr[AXIL_AW +: SEL_W]) ? s_awaddr[AXIL_AW +: SEL_W] : '0;
          w_addr  <= s_awaddr[AXIL_AW-1:0];
          w_data  <= s_wdata;
          w_strb  <= s_wstrb;
          aw_pend <= mapped(s_awaddr[AXIL_AW +: SEL_W]);
          w_pend  <= mapped(s_awaddr[AXIL_AW +: SEL_W]);
          w_state <= mapped(s_awaddr[AXIL_AW +: SEL_W]) ? X_REQ : X_RESP;
        end
        X_REQ: begin
          if (m_awready[w_sel]) aw_pend <= 1'b0;
          if (m_wready[w_sel])  w_pend  <= 1'b0;
          if ((!aw_pend || m_awready[w_sel]) && (!w_pend || m_wready[w_sel]))
            w_state <= X_RESP;
        end
        X_RESP: if (s_bvalid && s_bready) w_state <= X_IDLE;
        default: w_state <= X_IDLE;
      endcase
    end
  end

  // ---------------- read path ----------------
  assign s_arready = (r_state == X_IDLE) && s_arvalid;

  always_comb begin
    for (int i = 0; i < N_SLV; i++) begin
      m_araddr[i]  = r_addr;
      m_arvalid[i] = (r_state == X_REQ) && (r_sel == SEL_W'(i));
      m_rready[i]  = (r_state == X_RESP) && s_rready && (r_sel == SEL_W'(i));
    end
  end

  assign s_rvalid = (r_state == X_RESP) && (r_err || m_rvalid[r_sel]);
  assign s_rdata  = r_err ? '0 : m_rdata[r_sel];
  assign s_rresp  = r_err ? 2'(RESP_DECERR) : m_rresp[r_sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_state <= X_IDLE;
      r_sel   <= '0;
      r_err   <= 1'b0;
      r_addr  <= '0;
    end else begin
      unique case (r_state)
        X_IDLE: if (s_arready) begin
          r_err   <= !mapped(s_araddr[AXIL_AW +: SEL_W]);
          r_sel   <= mapped(s_araddr[AXIL_AW +: SEL_W]) ? s_araddr[AXIL_AW +: SEL_W] : '0;
          r_addr  <= s_araddr[AXIL_AW-1:0];
          r_state <= mapped(s_araddr[AXIL_AW +: SEL_W]) ? X_REQ : X_RESP;
        end
        X_REQ:  if (m_arready[r_sel]) r_state <= X_RESP;
        X_RESP: if (s_rvalid && s_rready) r_state <= X_IDLE;
        default: r_state <= X_IDLE;
      endcase
    end
  end

  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             s_bvalid && !s_bready |=> s_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             s_rvalid && !s_rready |=> s_rvalid);

endmodule
