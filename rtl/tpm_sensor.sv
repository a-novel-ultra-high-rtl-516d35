// tpm_sensor -- digital periphery of the TPM image sensor.
//
// The sensor array (1024 x 1024 pixels) is driven from all four sides. To
// halve the load on each line, every control line is split in the middle of
// the array and driven from both ends:
//   * left and right:  Reset block (RST rows), Write Y block (WRITEY rows)
//                      and Read block (SELECT rows, counter + decoder);
//   * top and bottom:  Bias On block (BIASON columns) and Write X block
//                      (WRITEX columns).
// Each side holds a full-length register; the two copies of a block get the
// same control inputs. On a row line the left copy drives columns
// 0..LINES/2-1 and the right copy the rest. On a column line the bottom copy
// drives rows 0..LINES/2-1 (row 0 is at the bottom) and the top copy the
// rest. The Bias On registers share the WRTX controls: the document gives
// them the same pattern and the same slow clock. The analog level drivers,
// column readout, output amplifiers and bias generator are not modelled. All
// lines leave as ports, to the pixel array.
//
// The block placement and the split drive follow the document. Which half
// each copy feeds, and sharing the WRTX controls with Bias On, are this
// design's reading of it.
`timescale 1ns / 1ps
module tpm_sensor
  import tpm_pkg::*;
#(
  parameter int unsigned LINES = LINES_DEFAULT,
  parameter int unsigned CNT_W = ROW_CNT_W
) (
  input  reg_ctrl_t          wrtx_ctrl,
  input  reg_ctrl_t          biason_ctrl,
  input  reg_ctrl_t          wrty_ctrl,
  input  reg_ctrl_t          rst_ctrl,
  input  rd_ctrl_t           rd_ctrl,
  // row lines: left copy (columns 0..LINES/2-1), right copy (the rest)
  output logic [LINES-1:0]   rst_l,    rst_r,
  output logic [LINES-1:0]   writey_l, writey_r,
  output logic [LINES-1:0]   select_l, select_r,
  // column lines: top copy (rows LINES/2..LINES-1), bottom copy (rows 0..LINES/2-1)
  output logic [LINES-1:0]   writex_t, writex_b,
  output logic [LINES-1:0]   biason_t, biason_b,
  output logic [CNT_W-1:0]   row_l,    row_r
);


  tpm_line_register #(.LINES(LINES)) u_reset_l  (.ctrl(rst_ctrl),    .sr_q(), .line(rst_l));
  tpm_line_register #(.LINES(LINES)) u_reset_r  (.ctrl(rst_ctrl),    .sr_q(), .line(rst_r));
  tpm_line_register #(.LINES(LINES)) u_writey_l (.ctrl(wrty_ctrl),   .sr_q(), .line(writey_l));
  tpm_line_register #(.LINES(LINES)) u_writey_r (.ctrl(wrty_ctrl),   .sr_q(), .line(writey_r));
  tpm_line_register #(.LINES(LINES)) u_writex_t (.ctrl(wrtx_ctrl),   .sr_q(), .line(writex_t));
  tpm_line_register #(.LINES(LINES)) u_writex_b (.ctrl(wrtx_ctrl),   .sr_q(), .line(writex_b));
  tpm_line_register #(.LINES(LINES)) u_biason_t (.ctrl(biason_ctrl), .sr_q(), .line(biason_t));
  tpm_line_register #(.LINES(LINES)) u_biason_b (.ctrl(biason_ctrl), .sr_q(), .line(biason_b));

  tpm_read_block #(.LINES(LINES), .CNT_W(CNT_W)) u_read_l (.ctrl(rd_ctrl), .row(row_l), .select(select_l));
  tpm_read_block #(.LINES(LINES), .CNT_W(CNT_W)) u_read_r (.ctrl(rd_ctrl), .row(row_r), .select(select_r));

endmodule
