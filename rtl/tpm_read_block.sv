// tpm_read_block -- row-select counter and decoder (the "Read Block").
//
// During readout one pixel row at a time drives its column lines through
// its SELECT switch. The sensor addresses the rows with a 10-bit counter
// followed by a one-of-1024 decoder; a copy sits on each side of the array.
// The counter clears asynchronously on rd_rst (row 0) and steps to the next
// row on each rising edge of rd_clk, wrapping after the last row. While
// rd_enable is high, exactly one SELECT line (the counted row) is high;
// otherwise all are low.
//
// The document gives the counter-plus-decoder structure and the 10-bit
// width. These are this design's own choices: the clock edge, the clear, the
// wrap and the enable.
//
// Interface: ctrl (tpm_pkg::rd_ctrl_t), row = current count, select = one
// line per row. Timing: select follows the count combinationally.
`timescale 1ns / 1ps
module tpm_read_block
  import tpm_pkg::*;
#(
  parameter int unsigned LINES = LINES_DEFAULT,
  parameter int unsigned CNT_W = ROW_CNT_W
) (
  input  rd_ctrl_t          ctrl,
  output logic [CNT_W-1:0]  row,
  output logic [LINES-1:0]  select
);

  logic rd_clk, rd_clr;

  assign rd_clk = ctrl.rd_clk;
  assign rd_clr = ctrl.rd_rst;

  always_ff @(posedge rd_clk or posedge rd_clr) begin
    if (rd_clr)                              row <= '0;
    else if (32'(row) == LINES - 1)          row <= '0;
    else                                     row <= row + 1'b1;
  end

  always_comb begin
    select = '0;
    if (ctrl.rd_enable) select[row] = 1'b1;
  end

endmodule
