// tpm_line_register -- one shift-register + parallel-latch line driver.
//
// The Write X, Bias On, Write Y and Reset blocks of the TPM sensor all use
// this structure. Each sits on one side of the pixel array and drives one
// control line per row or column. A serial shift register holds the next
// line pattern. It takes a new bit into line 0 and moves every bit up one
// line on the FALLING edge of sr_clkin, as the sensor's timing description
// states. A parallel latch copies the whole register on the rising edge of
// pl_clk. So the pattern seen by the pixels changes in one step, however
// many shifts came before. The latch output is ANDed with `enable`, which
// lets a short write pulse be cut out of a long phase. The analog level
// drivers that follow are not modelled: `line` is their logic input.
//
// The document gives the shift direction (the pattern walks from line 0
// upwards), the falling shift edge and the 1024 length. These are this
// design's own choices: the latch's rising edge, the active-high
// asynchronous clears and the AND gating by enable.
//
// Interface: ctrl (tpm_pkg::reg_ctrl_t), sr_q = raw shift-register bits,
// line = latched and enabled outputs. No system clock: sr_clkin and pl_clk
// are clocks of their own, as on the chip.
`timescale 1ns / 1ps
module tpm_line_register
  import tpm_pkg::*;
#(
  parameter int unsigned LINES = LINES_DEFAULT
) (
  input  reg_ctrl_t          ctrl,
  output logic [LINES-1:0]   sr_q,
  output logic [LINES-1:0]   line
);

  logic [LINES-1:0] latch_q;
  logic             sr_clk, sr_clr, pl_clk, pl_clr;

  assign sr_clk = ctrl.sr_clkin;
  assign sr_clr = ctrl.sr_rst;
  assign pl_clk = ctrl.pl_clk;
  assign pl_clr = ctrl.pl_rst;

  // Serial shift register: line 0 takes the new bit, line i takes line i-1.
  always_ff @(negedge sr_clk or posedge sr_clr) begin
    if (sr_clr) sr_q <= '0;
    else             sr_q <= {sr_q[LINES-2:0], ctrl.sr_din};
  end

  // Parallel latch: the line pattern changes all at once.
  always_ff @(posedge pl_clk or posedge pl_clr) begin
    if (pl_clr) latch_q <= '0;
    else             latch_q <= sr_q;
  end

  assign line = latch_q & {LINES{ctrl.enable}};

endmodule
