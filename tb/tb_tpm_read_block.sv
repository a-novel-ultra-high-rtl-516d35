// tb_tpm_read_block -- self-checking test of the row-select counter and
// decoder.
//
// The default 1024-row block and a 12-row one (not a power of two) run side
// by side from one control bundle. A row index kept by the test predicts
// each: after the clear the count is 0. Each rising rd_clk adds one,
// wrapping after the last row. With rd_enable high, SELECT is one-hot at
// the count; with it low, SELECT is all zero. A full scan of the 1024 rows
// must select every row exactly once, in order.
`timescale 1ns / 1ps
module tb_tpm_read_block;
  import tpm_pkg::*;

  localparam int unsigned NL = LINES_DEFAULT;
  localparam int unsigned NS = 12;

  rd_ctrl_t           ctrl;
  logic [9:0]         row_l;
  logic [NL-1:0]      sel_l;
  logic [3:0]         row_s;
  logic [NS-1:0]      sel_s;
  int checks = 0, failures = 0;
  int exp_l, exp_s;
  int seen [NL];

  tpm_read_block                          dut_l (.ctrl(ctrl), .row(row_l), .select(sel_l));
  tpm_read_block #(.LINES(NS), .CNT_W(4)) dut_s (.ctrl(ctrl), .row(row_s), .select(sel_s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (row_l=%0d exp %0d, row_s=%0d exp %0d)", what, row_l, exp_l, row_s, exp_s);
    end
  endtask

  task automatic check_state();
    logic [NL-1:0] el;
    logic [NS-1:0] es;
    el = '0; es = '0;
    if (ctrl.rd_enable) begin
      el[exp_l] = 1'b1;
      es[exp_s] = 1'b1;
    end
    check(int'(row_l) == exp_l && sel_l == el, "1024-row counter/decoder");
    check(int'(row_s) == exp_s && sel_s == es, "12-row counter/decoder");
  endtask

  task automatic step();
    #2 ctrl.rd_clk = 1'b1;
    exp_l = (exp_l + 1) % NL;
    exp_s = (exp_s + 1) % NS;
    #2 ctrl.rd_clk = 1'b0;
    #1 check_state();
  endtask

  initial begin
    ctrl = RD_CTRL_IDLE;
    #1 ctrl.rd_rst = 1'b1;
    exp_l = 0; exp_s = 0;
    #3 check_state();
    ctrl.rd_rst = 1'b0;
    // Disabled: counting goes on, no SELECT.
    for (int i = 0; i < 5; i++) step();
    // Clear again, then scan every row with SELECT enabled.
    ctrl.rd_rst = 1'b1; exp_l = 0; exp_s = 0;
    #1 ctrl.rd_rst = 1'b0;
    ctrl.rd_enable = 1'b1;
    #1 check_state();
    foreach (seen[i]) seen[i] = 0;
    for (int i = 0; i < int'(NL); i++) begin
      for (int r = 0; r < int'(NL); r++) if (sel_l[r]) seen[r]++;
      if (i < int'(NL) - 1) step();
    end
    begin
      automatic bit all_once = 1'b1;
      foreach (seen[i]) if (seen[i] != 1) all_once = 1'b0;
      check(all_once, "full scan selects each of 1024 rows once");
    end
    // Wrap from the last row back to row 0.
    step();
    check(row_l == 10'd0, "1024-row counter wraps to 0");
    ctrl.rd_enable = 1'b0;
    #1 check_state();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
