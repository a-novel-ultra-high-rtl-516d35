// tb_tpm_sequencer -- self-checking test of the TPM frame sequencer.
//
// The sequencer (32 lines, so the test stays short) drives a reference
// model of the line registers. The model is written here from the
// register rules: shift on the falling sr_clkin, latch on the rising pl_clk,
// lines = latch AND enable. Several frames with different masks are run,
// including masks that do not divide the line count, and a two-frame
// continuous run. For every frame the test checks:
//   * RST is preset to all ones and latched, with RST enabled, before the
//     patterns load, so all rows stay in reset until the first phase;
//   * exactly LINES pattern bits are loaded before the first latch;
//   * in exposure phase p (group p), the row latches hold 1 exactly on the
//     rows y with y mod MY == p mod MY (RST holds the inverse), and the
//     column latches hold 1 exactly on the columns x with
//     x mod MX == p div MY; subframe == p;
//   * the phase lasts t_phase cycles and WRTY_ENABLE is high for
//     wr_end - wr_start cycles in it; RST and WRTX stay enabled;
//   * WRTX is clocked once per MY phases (MY times slower than WRTY);
//   * readout selects rows 0..LINES-1 in order, t_row cycles each, with
//     all write enables off;
//   * frame_done comes 3 + 4*LINES + MX*MY*t_phase + LINES*t_row cycles
//     after start is taken.
`timescale 1ns / 1ps
module tb_tpm_sequencer;
  import tpm_pkg::*;

  localparam int unsigned L  = 32;
  localparam int unsigned MM = 16;
  localparam int unsigned MW = $clog2(MM + 1);

  logic clk = 1'b0, rst_n = 1'b1;
  logic start = 1'b0, continuous = 1'b0;
  logic [MW-1:0] mask_x = '0, mask_y = '0;
  logic [15:0] t_phase = '0, wr_start = '0, wr_end = '0, t_row = '0;
  reg_ctrl_t wx, wy, wr;
  rd_ctrl_t  rd;
  logic busy, loading, exposing, reading, frame_done;
  logic [2*MW-1:0] subframe;

  tpm_sequencer #(.LINES(L), .MAX_MASK(MM)) dut (
    .clk, .rst_n, .start, .continuous, .mask_x, .mask_y, .t_phase, .wr_start, .wr_end, .t_row,
    .wrtx_ctrl(wx), .wrty_ctrl(wy), .rst_ctrl(wr), .rd_ctrl(rd),
    .busy, .loading, .exposing, .reading, .subframe, .frame_done);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- reference register model
  logic [L-1:0] x_sr, x_pl, y_sr, y_pl, r_sr, r_pl;
  int x_shifts, y_shifts, r_shifts, x_latches;
  always @(negedge wx.sr_clkin or posedge wx.sr_rst)
    if (wx.sr_rst) x_sr <= '0; else begin x_sr <= {x_sr[L-2:0], wx.sr_din}; x_shifts++; end
  always @(negedge wy.sr_clkin or posedge wy.sr_rst)
    if (wy.sr_rst) y_sr <= '0; else begin y_sr <= {y_sr[L-2:0], wy.sr_din}; y_shifts++; end
  always @(negedge wr.sr_clkin or posedge wr.sr_rst)
    if (wr.sr_rst) r_sr <= '0; else begin r_sr <= {r_sr[L-2:0], wr.sr_din}; r_shifts++; end
  always @(posedge wx.pl_clk or posedge wx.pl_rst)
    if (wx.pl_rst) x_pl <= '0; else begin x_pl <= x_sr; x_latches++; end
  always @(posedge wy.pl_clk or posedge wy.pl_rst) if (wy.pl_rst) y_pl <= '0; else y_pl <= y_sr;
  always @(posedge wr.pl_clk or posedge wr.pl_rst) if (wr.pl_rst) r_pl <= '0; else r_pl <= r_sr;

  // ---------------- per-frame monitor
  int mx, my, tph, ws, we, trow;
  int phase, cyc_in_phase, en_cycles, row_exp, row_cycles, frame_cycles;
  int phase_checks_seen, frames_done;
  bit in_frame;

  task automatic check_phase_start();
    automatic bit ok_y = 1'b1, ok_r = 1'b1, ok_x = 1'b1;
    automatic int k = phase % my, j = phase / my;
    for (int y = 0; y < int'(L); y++) begin
      if (y_pl[y] != ((y % my) == k)) ok_y = 1'b0;
      if (r_pl[y] != ((y % my) != k)) ok_r = 1'b0;
      if (x_pl[y] != ((y % mx) == j)) ok_x = 1'b0;
    end
    check(ok_y, $sformatf("WRTY rows in phase %0d", phase));
    check(ok_r, $sformatf("RST rows in phase %0d", phase));
    check(ok_x, $sformatf("WRTX columns in phase %0d", phase));
    check(int'(subframe) == phase, $sformatf("subframe %0d vs phase %0d", subframe, phase));
    check(x_latches == 1 + j, "WRTX latched once per column group");
    phase_checks_seen++;
  endtask

  always @(posedge clk) begin
    #1;
    if (in_frame) begin
      frame_cycles++;
      if (loading && !wr.pl_clk) begin
        check(wr.enable && (&(r_pl)), "all rows held in reset while loading");
        check(!wy.enable && !wx.enable, "write lines off while loading");
      end
      if (exposing) begin
        if (wy.pl_clk) begin
          if (phase >= 0) begin
            check(cyc_in_phase == tph, $sformatf("phase length %0d, expected %0d", cyc_in_phase, tph));
            check(en_cycles == we - ws, $sformatf("write window %0d, expected %0d", en_cycles, we - ws));
          end else begin
            check(y_shifts == int'(L) && x_shifts == int'(L) && r_shifts == 2 * int'(L), "LINES bits loaded (RST: preset + pattern)");
          end
          phase++;
          cyc_in_phase = 0; en_cycles = 0;
        end
        #1 if (wy.pl_clk) check_phase_start();
        cyc_in_phase++;
        if (wy.enable) en_cycles++;
        check(wr.enable && wx.enable, "RST and WRTX enabled during exposure");
      end
      if (rd.rd_enable) begin
        check(reading, "reading flag during readout");
        if (rd.rd_clk) begin
          check(row_cycles == trow, $sformatf("row %0d held %0d cycles", row_exp, row_cycles));
          row_exp++; row_cycles = 0;
        end
        check(!wy.enable && !wx.enable, "write lines off during readout");
        row_cycles++;
      end
      if (frame_done) begin
        check(phase == mx * my - 1, $sformatf("%0d phases, expected %0d", phase + 1, mx * my));
        check(cyc_in_phase == tph, "last phase length");
        check(row_exp == int'(L) - 1 && row_cycles == trow, "all rows read");
        check(x_shifts == int'(L) + mx - 1, "WRTX shifted MY times slower");
        check(y_shifts == int'(L) + mx * my - 1, "WRTY shifted once per phase");
        check(frame_cycles == 3 + 4 * int'(L) + mx * my * tph + int'(L) * trow,
              $sformatf("frame took %0d cycles", frame_cycles));
        frames_done++;
        frame_reset();
      end
    end
  end

  function automatic void frame_reset();
    phase = -1; cyc_in_phase = 0; en_cycles = 0; row_exp = 0; row_cycles = 0;
    x_shifts = 0; y_shifts = 0; r_shifts = 0; x_latches = 0;
    frame_cycles = 0;
  endfunction

  task automatic run_frame(input int ax, input int ay, input int p, input int s, input int e,
                           input int r, input int nframes);
    mx = ax; my = ay; tph = p; ws = s; we = e; trow = r;
    frame_reset();
    frames_done = 0;
    @(negedge clk);
    mask_x = MW'(ax); mask_y = MW'(ay);
    t_phase = 16'(p); wr_start = 16'(s); wr_end = 16'(e); t_row = 16'(r);
    continuous = (nframes > 1);
    start = 1'b1;
    @(posedge clk);
    in_frame = 1'b1;
    frame_cycles = -1;   // count from the edge that takes start
    @(negedge clk) start = 1'b0;
    while (frames_done < nframes) begin
      @(negedge clk);
      if (frames_done == nframes - 1) continuous = 1'b0;
    end
    in_frame = 1'b0;
    repeat (3) @(negedge clk);
    check(!busy, "idle after the last frame");
  endtask

  initial begin
    in_frame = 1'b0;
    frame_reset();
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_frame(4, 4, 8, 2, 6, 3, 1);   // the document's 4x4 example
    run_frame(2, 2, 5, 1, 5, 2, 1);   // 2x2 grid
    run_frame(3, 5, 6, 0, 3, 2, 1);   // masks that do not divide 32
    run_frame(1, 1, 3, 0, 3, 2, 1);   // no multiplexing
    run_frame(4, 4, 4, 1, 2, 2, 2);   // two frames back to back
    check(phase_checks_seen == 16 + 4 + 15 + 1 + 32, $sformatf("%0d phases seen", phase_checks_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
