// cu_pkg: constants and types shared by the channel-utilization (CU) stress
// forecaster.
//
// The forecaster builds a histogram of a window of CU samples (percent,
// 0..100), turns it into a cumulative sum and inverts that sum by linear
// interpolation to obtain the CU value below which a fraction p of the window
// lies. The constants below fix the stream word, the bin layout, the fixed-point
// formats and the AXI-Lite register map of the three processing stages.
//
// From the source design: 32-bit AXI-Stream words with all four byte lanes
// valid, equal-width bins starting at 0 (bin i holds i*BIN_SIZE <= x <
// (i+1)*BIN_SIZE), a data-window-size register in the histogram stage and a
// probability register and result register in the interpolation stage.
// Own choices: 20 bins of width 5 (0..100 % in steps of 5), a 16-bit
// probability fraction, a 16.16 fixed-point result, and the register offsets.
package cu_pkg;

  // Stream word width and byte-lane count.
  localparam int unsigned AXIS_W     = 32;
  localparam int unsigned AXIS_BYTES = AXIS_W / 8;

  // Histogram layout.
  localparam int unsigned N_BINS_DEF   = 20;
  localparam int unsigned BIN_SIZE_DEF = 5;

  // Fixed-point formats: probability p is an unsigned 0.16 fraction, the
  // percentile result is unsigned 16.16.
  localparam int unsigned PROB_FRAC = 16;
  localparam int unsigned RES_FRAC  = 16;

  // AXI-Lite control port.
  localparam int unsigned AXIL_AW = 12;   // address bits of one IP's window
  localparam int unsigned AXIL_DW = 32;

  // Register byte offsets inside an IP's window.
  localparam logic [AXIL_AW-1:0] REG_CTRL   = 12'h000; // b0 start (W), b1 done (R, clear on read), b2 idle (R)
  localparam logic [AXIL_AW-1:0] REG_WINDOW = 12'h010; // data window size (samples)
  localparam logic [AXIL_AW-1:0] REG_PROB   = 12'h018; // invcum: probability p, 0.16
  localparam logic [AXIL_AW-1:0] REG_RESULT = 12'h020; // invcum: percentile estimate, 16.16
  localparam logic [AXIL_AW-1:0] REG_BIN    = 12'h028; // invcum: interval index the estimate fell in

  // AXI response codes used.
  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  // One register write as the AXI-Lite port hands it to its IP.
  typedef struct packed {
    logic                   en;
    logic [AXIL_AW-1:0]     addr;
    logic [AXIL_DW-1:0]     data;
    logic [AXIL_DW/8-1:0]   strb;
  } reg_wr_t;

  // Merge a written word into a register, byte lane by byte lane.
  function automatic logic [AXIL_DW-1:0] apply_strb(input logic [AXIL_DW-1:0]   old_v,
                                                    input logic [AXIL_DW-1:0]   new_v,
                                                    input logic [AXIL_DW/8-1:0] strb);
    logic [AXIL_DW-1:0] r;
    for (int b = 0; b < AXIL_DW/8; b++)
      r[8*b +: 8] = strb[b] ? new_v[8*b +: 8] : old_v[8*b +: 8];
    return r;
  endfunction

endpackage
