// ip_ctrl: start/done/idle handshake of a processing stage, seen through its
// control register (offset REG_CTRL).
//
// The processor writes 1 to bit 0 to start one run; the stage answers with a
// one-cycle `finish` when the run is over. Reading the register returns
// {.., idle (bit 2), done (bit 1), start/busy (bit 0)}. `done` is sticky: it
// is set by `finish` and cleared by a read of the register, and it also
// drives the stage's interrupt line, so the processor can either poll or wait
// for the interrupt. A start written while a run is in progress is ignored.
//
// The start/done/idle bits mirror the control interface that high-level
// synthesis tools give a generated block, which is how the source design's
// stages were built; the bit positions and clear-on-read are this design's
// choices.
module ip_ctrl
  import cu_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  reg_wr_t            wr,
  input  logic               rd_en,
  input  logic [AXIL_AW-1:0] rd_addr,
  input  logic               finish,     // run complete, one cycle
  output logic               start,      // run begins, one cycle
  output logic               busy,
  output logic [AXIL_DW-1:0] ctrl_word,
  output logic               irq
);

  logic done;

  assign start = wr.en && wr.addr == REG_CTRL && wr.strb[0] && wr.data[0] && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      if (start)       busy <= 1'b1;
      else if (finish) busy <= 1'b0;
      if (finish)                                   done <= 1'b1;
      else if (rd_en && rd_addr == REG_CTRL)        done <= 1'b0;
    end
  end

  assign ctrl_word = {{(AXIL_DW-3){1'b0}}, !busy, done, busy};
  assign irq       = done;

  a_finish_when_busy: assert property (@(posedge clk) disable iff (!rst_n) finish |-> busy);

endmodule
