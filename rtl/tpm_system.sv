// tpm_system -- a temporal-pixel-multiplexing (TPM) camera core: the frame
// sequencer wired to the sensor's digital periphery.
//
// A TPM sensor trades spatial for temporal resolution without a faster
// readout. The array is tiled with a MASK_X x MASK_Y grid, and each grid
// position (a "pixel group") is exposed in its own short time slot within
// one frame. Each pixel stores its sample in an in-pixel capacitor. After
// all groups are exposed, the full-resolution frame is read out once. It
// then splits into MASK_X*MASK_Y sub-frames of lower resolution, one per
// time slot. The mask size sets the trade-off, so the number of sub-frames
// can be configured.
//
// tpm_sequencer makes the register waveforms; tpm_sensor holds the
// split-drive line registers (Reset, Write Y, Write X, Bias On) and the
// row-select read blocks. The pixel array and the analog column readout
// are outside this design. All their row and column control lines are
// output ports here, with the `_l/_r` (row) and `_t/_b` (column) copies
// each driving one half of the array.
//
// Interface: clk/rst_n and the sequencer's configuration and status (see
// tpm_sequencer); the line ports are level signals, one bit per row or
// column. Timing: frame_done rises 3 + 4*LINES + MASK_X*MASK_Y*t_phase +
// LINES*t_row clock cycles after the edge that takes start. That is
// 1 clear cycle, 4*LINES cycles of reset preset and pattern load, the
// exposure phases, 1 + LINES*t_row cycles of readout and 1 done cycle.
`timescale 1ns / 1ps
module tpm_system
  import tpm_pkg::*;
#(
  parameter int unsigned LINES    = LINES_DEFAULT,
  parameter int unsigned MAX_MASK = 16,
  parameter int unsigned TW       = 16,
  localparam int unsigned MW      = $clog2(MAX_MASK + 1),
  localparam int unsigned CNT_W   = ROW_CNT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              continuous,
  input  logic [MW-1:0]     mask_x,
  input  logic [MW-1:0]     mask_y,
  input  logic [TW-1:0]     t_phase,
  input  logic [TW-1:0]     wr_start,
  input  logic [TW-1:0]     wr_end,
  input  logic [TW-1:0]     t_row,
  output logic              busy,
  output logic              loading,
  output logic              exposing,
  output logic              reading,
  output logic [2*MW-1:0]   subframe,
  output logic              frame_done,
  // pixel-array control lines
  output logic [LINES-1:0]  rst_l,    rst_r,
  output logic [LINES-1:0]  writey_l, writey_r,
  output logic [LINES-1:0]  select_l, select_r,
  output logic [LINES-1:0]  writex_t, writex_b,
  output logic [LINES-1:0]  biason_t, biason_b,
  output logic [CNT_W-1:0]  row_l,    row_r
);

  reg_ctrl_t wrtx_ctrl, wrty_ctrl, rst_ctrl;
  rd_ctrl_t  rd_ctrl;

  tpm_sequencer #(.LINES(LINES), .MAX_MASK(MAX_MASK), .TW(TW)) u_seq (
    .clk, .rst_n, .start, .continuous, .mask_x, .mask_y,
    .t_phase, .wr_start, .wr_end, .t_row,
    .wrtx_ctrl, .wrty_ctrl, .rst_ctrl, .rd_ctrl,
    .busy, .loading, .exposing, .reading, .subframe, .frame_done
  );

  tpm_sensor #(.LINES(LINES), .CNT_W(CNT_W)) u_sensor (
    .wrtx_ctrl   (wrtx_ctrl),
    .biason_ctrl (wrtx_ctrl),
    .wrty_ctrl   (wrty_ctrl),
    .rst_ctrl    (rst_ctrl),
    .rd_ctrl     (rd_ctrl),
    .rst_l, .rst_r, .writey_l, .writey_r, .select_l, .select_r,
    .writex_t, .writex_b, .biason_t, .biason_b, .row_l, .row_r
  );

endmodule
