// tb_tpm_line_register -- self-checking test of the shift-register +
// parallel-latch line driver (Write X, Bias On, Write Y and Reset blocks).
//
// Two instances share one control bundle: a 16-line one and one at the
// default 1024 lines. A reference model (plain bit vectors updated by the
// test itself) predicts both. Checked:
//   * both asynchronous clears;
//   * bits move only on the falling edge of sr_clkin, never the rising one;
//   * the lines keep their value while the register shifts, and take the
//     register contents on the rising edge of pl_clk;
//   * enable low forces every line low;
//   * the 4x4-mask example: a 1000 row pattern and the 0111 reset pattern,
//     loaded serially and then stepped one line per shift+latch, give
//     exactly the lines y with (y - step) mod 4 == 0 (1000) or != 0 (0111).
`timescale 1ns / 1ps
module tb_tpm_line_register;
  import tpm_pkg::*;

  localparam int unsigned NS = 16;
  localparam int unsigned NL = LINES_DEFAULT;

  reg_ctrl_t        ctrl;
  logic [NS-1:0]    sr_s, line_s;
  logic [NL-1:0]    sr_l, line_l;
  logic [NL-1:0]    m_sr, m_pl;   // model
  int checks = 0, failures = 0;

  tpm_line_register #(.LINES(NS)) dut_s (.ctrl(ctrl), .sr_q(sr_s), .line(line_s));
  tpm_line_register               dut_l (.ctrl(ctrl), .sr_q(sr_l), .line(line_l));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (sr_s=%h line_s=%h m_sr=%h m_pl=%h en=%0b)",
               what, sr_s, line_s, m_sr[NS-1:0], m_pl[NS-1:0], ctrl.enable);
    end
  endtask

  task automatic check_all(input string what);
    logic [NL-1:0] exp_line;
    exp_line = m_pl & {NL{ctrl.enable}};
    check(sr_s == m_sr[NS-1:0] && sr_l == m_sr, {what, ": shift register"});
    check(line_s == exp_line[NS-1:0] && line_l == exp_line, {what, ": lines"});
  endtask

  // One serial bit: data set up, clock high, clock low (shift on the fall).
  task automatic shift_in(input logic d);
    ctrl.sr_din = d;
    #2 ctrl.sr_clkin = 1'b1;
    #2 check_all("no shift on rising sr_clkin");
    ctrl.sr_clkin = 1'b0;
    m_sr = {m_sr[NL-2:0], d};
    #2 check_all("shift on falling sr_clkin");
  endtask

  task automatic latch();
    #1 ctrl.pl_clk = 1'b1;
    m_pl = m_sr;
    #1 check_all("latch on rising pl_clk");
    ctrl.pl_clk = 1'b0;
    #1;
  endtask

  task automatic clear_all();
    ctrl.sr_rst = 1'b1; ctrl.pl_rst = 1'b1;
    m_sr = '0; m_pl = '0;
    #2 check_all("asynchronous clear");
    ctrl.sr_rst = 1'b0; ctrl.pl_rst = 1'b0;
    #2;
  endtask

  // Load a period-4 pattern so that line i gets ((i mod 4 == 0) ^ inv),
  // then step it and compare against the mask rule.
  task automatic mask_pattern(input bit inv);
    logic exp;
    bit ok_s, ok_l;
    clear_all();
    ctrl.enable = 1'b1;
    for (int t = 0; t < int'(NL); t++) shift_in(logic'((((NL - 1 - t) % 4) == 0) ^ inv));
    for (int s = 0; s < 12; s++) begin
      if (s > 0) shift_in(logic'(((s % 4) == 0) ^ inv));
      latch();
      ok_s = 1'b1; ok_l = 1'b1;
      for (int y = 0; y < int'(NL); y++) begin
        exp = logic'((((y - s + 4 * NL) % 4) == 0) ^ inv);
        if (line_l[y] != exp) ok_l = 1'b0;
        if (y < int'(NS) && line_s[y] != exp) ok_s = 1'b0;
      end
      check(ok_l, inv ? "0111 reset pattern (1024 lines)" : "1000 pattern (1024 lines)");
      check(ok_s, inv ? "0111 reset pattern (16 lines)"   : "1000 pattern (16 lines)");
    end
  endtask

  initial begin
    ctrl = REG_CTRL_IDLE;
    #1 ctrl.sr_rst = 1'b1; ctrl.pl_rst = 1'b1;
    m_sr = '0; m_pl = '0;
    #5;
    clear_all();
    // Random data, lines disabled then enabled.
    ctrl.enable = 1'b0;
    for (int i = 0; i < 40; i++) shift_in(logic'($urandom_range(0, 1)));
    latch();
    ctrl.enable = 1'b1;
    #1 check_all("enable high");
    for (int i = 0; i < 7; i++) shift_in(logic'($urandom_range(0, 1)));
    check(line_s == m_pl[NS-1:0], "lines hold while shifting");
    latch();
    ctrl.enable = 1'b0;
    #1 check_all("enable low forces lines low");
    check(line_s == '0, "enable low: all 16 lines low");
    ctrl.enable = 1'b1;
    // Latch clear alone leaves the shift register.
    ctrl.pl_rst = 1'b1; m_pl = '0;
    #1 check_all("latch clear only");
    ctrl.pl_rst = 1'b0;
    mask_pattern(1'b0);
    mask_pattern(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
