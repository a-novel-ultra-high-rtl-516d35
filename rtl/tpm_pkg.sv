// tpm_pkg -- types and constants shared by the temporal-pixel-multiplexing
// (TPM) sensor periphery and its timing sequencer.
//
// Each line register of the sensor (Write X, Bias On, Write Y, Reset) is
// driven by the same six signals: a shift-register reset, clock and serial
// data input, a parallel-latch clock and reset, and an output enable.
// reg_ctrl_t bundles them. rd_ctrl_t bundles the inputs of the row-select
// counter (the read block). The array size and the 10-bit row counter width
// are the sensor's own figures. The field names follow the signal names of
// the sensor's timing diagrams.
`timescale 1ns / 1ps
package tpm_pkg;

  // Pixel array is 1024 x 1024; rows and columns use the same line count.
  localparam int unsigned LINES_DEFAULT = 1024;
  // The SELECT row counter is 10 bits wide.
  localparam int unsigned ROW_CNT_W = 10;

  // Control bundle of one shift-register + parallel-latch line register.
  typedef struct packed {
    logic sr_rst;   // asynchronous clear of the shift register (active high)
    logic sr_clkin; // shift clock; data moves on its falling edge
    logic sr_din;   // serial input, taken into line 0
    logic pl_clk;   // parallel-latch clock; loads on its rising edge
    logic pl_rst;   // asynchronous clear of the latch (active high)
    logic enable;   // output enable, ANDed into every line
  } reg_ctrl_t;

  localparam reg_ctrl_t REG_CTRL_IDLE = '0;

  // Control bundle of the row-select counter/decoder.
  typedef struct packed {
    logic rd_rst;    // asynchronous clear of the row counter (active high)
    logic rd_clk;    // advance to the next row on the rising edge
    logic rd_enable; // drive the decoded SELECT line
  } rd_ctrl_t;

  localparam rd_ctrl_t RD_CTRL_IDLE = '0;

endpackage
