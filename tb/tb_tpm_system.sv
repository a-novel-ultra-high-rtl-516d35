// tb_tpm_system -- end-to-end test of the TPM camera core at full size
// (1024 x 1024, default parameters).
//
// A behavioural model of the pixel array sits on the line ports. Each
// pixel takes its row lines from the left copy (x < 512) or the right copy,
// and its column lines from the bottom copy (y < 512) or the top copy, as
// on the chip. Per pixel the model records when its photodiode left reset
// (RST falling) and the cycles in which BIASON, WRITEX and WRITEY were all
// high (integrate/write). The readout puts a timestamp where a real pixel
// would hold its stored voltage. The test then rebuilds the sub-frames
// from the read-out frame, as the post-processing of a TPM camera does.
//
// Checked, for several masks (the 4x4 example, 2x2, and a 3x5 mask that
// does not divide 1024, run as two back-to-back frames):
//   * the two copies of every split line always agree;
//   * all rows stay in reset while the patterns load;
//   * pixel (x, y) belongs to group g = MY*(x mod MX) + (y mod MY). It is
//     written only in phase g, for wr_end - wr_start cycles. Its exposure
//     starts when phase g starts and ends at cycle wr_end - 1 of that
//     phase, so every group gets the same exposure time;
//   * readout selects each row once, in order, for t_row cycles, with all
//     write lines off;
//   * demultiplexing the read-out frame by timestamp gives MX*MY
//     sub-frames, each holding exactly the pixels of its grid position;
//   * the frame takes 3 + 4*LINES + MX*MY*t_phase + LINES*t_row cycles.
// A 12 x 12 window of behavioural analog pixels (tpm_pixel) sits on the
// same lines, at the corner and across the middle split. The light
// brightens every phase, and each pixel's read-out voltage must match the
// charge collected during its own group's exposure.
// It also counts how often each mechanism occurred (pattern load, row
// step, slower column step, pixel write, reset release, row select,
// sub-frame extraction, mask change, continuous restart) and counts a
// failure for any that never did.
`timescale 1ns / 1ps
module tb_tpm_system;
  import tpm_pkg::*;

  localparam int L  = int'(LINES_DEFAULT);
  localparam int H  = L / 2;
  localparam int MW = 5;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, continuous = 1'b0;
  logic [MW-1:0] mask_x = '0, mask_y = '0;
  logic [15:0] t_phase = '0, wr_start = '0, wr_end = '0, t_row = '0;
  logic busy, loading, exposing, reading, frame_done;
  logic [2*MW-1:0] subframe;
  logic [L-1:0] rst_l, rst_r, writey_l, writey_r, select_l, select_r;
  logic [L-1:0] writex_t, writex_b, biason_t, biason_b;
  logic [9:0]   row_l, row_r;

  tpm_system dut (
    .clk, .rst_n, .start, .continuous, .mask_x, .mask_y, .t_phase, .wr_start, .wr_end, .t_row,
    .busy, .loading, .exposing, .reading, .subframe, .frame_done,
    .rst_l, .rst_r, .writey_l, .writey_r, .select_l, .select_r,
    .writex_t, .writex_b, .biason_t, .biason_b, .row_l, .row_r);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ------------------------------------------------ analog pixel window
  // 12 x 12 behavioural pixels at the array corner and around the split in
  // the middle. The light brightens each phase: 20*(p+1) electrons/ns in
  // phase p. So a pixel of group g should read out
  // VRESET - 20*(g+1) * (wr_end * 10 ns) * 17 uV.
  localparam int NW = 12;
  localparam int PX [NW] = '{0, 1, 2, 3, 4, 5, 6, 7, 510, 511, 512, 513};
  real  light;
  real  w_pd [NW][NW], w_store [NW][NW], w_col [NW][NW];
  logic w_drive [NW][NW];
  int   n_analog = 0;

  always_comb light = exposing ? 20.0 * real'(int'(subframe) + 1) : 0.0;

  for (genvar i = 0; i < NW; i++) begin : g_px_x
    for (genvar j = 0; j < NW; j++) begin : g_px_y
      tpm_pixel u_px (
        .rst       ((PX[i] < H) ? rst_l[PX[j]]    : rst_r[PX[j]]),
        .writey    ((PX[i] < H) ? writey_l[PX[j]] : writey_r[PX[j]]),
        .select    ((PX[i] < H) ? select_l[PX[j]] : select_r[PX[j]]),
        .writex    ((PX[j] < H) ? writex_b[PX[i]] : writex_t[PX[i]]),
        .biason    ((PX[j] < H) ? biason_b[PX[i]] : biason_t[PX[i]]),
        .photo_rate(light),
        .v_pd      (w_pd[i][j]),
        .v_store   (w_store[i][j]),
        .v_col     (w_col[i][j]),
        .col_drive (w_drive[i][j]));
    end
  end

  // Read the window's pixels on the selected row and compare with the
  // exposure of their group. Tolerance: one 1 ns model step at each end.
  task automatic check_analog_row(input int sel);
    for (int j = 0; j < NW; j++) begin
      if (PX[j] != sel) continue;
      for (int i = 0; i < NW; i++) begin
        automatic int    g   = grp(PX[i], sel);
        automatic real   r   = 20.0 * real'(g + 1);
        automatic real   exp_v = 2.0 - r * real'(we * 10) * 17.0e-6;
        automatic real   tol = 2.0 * r * 17.0e-6 + 1.0e-9;
        automatic real   d   = w_col[i][j] - exp_v;
        check(w_drive[i][j] && d < tol && -d < tol,
              $sformatf("pixel [%0d;%0d] group %0d reads %f V, expected %f V", PX[i], sel, g, w_col[i][j], exp_v));
        n_analog++;
      end
    end
  endtask

  // ------------------------------------------------ pixel-array model
  int integ_start [L][L];   // [x][y] cycle the photodiode left reset, at the last write
  int wr_last     [L][L];   // last integrate/write cycle
  int wr_count    [L][L];   // integrate/write cycles this frame
  int readout     [L][L];   // frame as read out: [row order][x] = stored stamp
  int row_rst_fall_l [L], row_rst_fall_r [L];
  logic [L-1:0] prev_rst_l, prev_rst_r, prev_wy, prev_wx;
  int phase_start [256];

  int cyc, mx, my, tph, ws, we, trow;
  int frame_cycles, rows_read, row_hold, last_row, prev_sub, frame_writes;

  // mechanism counters
  int n_load = 0, n_row_step = 0, n_col_step = 0, n_write = 0, n_release = 0;
  int n_row_sel = 0, n_subframes = 0, n_mask_change = 0, n_restart = 0, n_split = 0;

  bit in_frame = 1'b0;

  function automatic int grp(input int x, input int y);
    return my * (x % mx) + (y % my);
  endfunction

  task automatic clear_frame();
    foreach (wr_count[x, y]) begin
      wr_count[x][y] = 0; wr_last[x][y] = -1; integ_start[x][y] = -1; readout[x][y] = -1;
    end
    foreach (phase_start[i]) phase_start[i] = -1;
    foreach (row_rst_fall_l[i]) begin row_rst_fall_l[i] = -1; row_rst_fall_r[i] = -1; end
    rows_read = 0; row_hold = 0; last_row = -1; prev_sub = -1; frame_writes = 0;
    frame_cycles = -1;
  endtask

  always @(posedge clk) begin
    #1;
    cyc++;
    if (in_frame) begin
      frame_cycles++;
      // split lines: both copies identical
      check(rst_l == rst_r && writey_l == writey_r && select_l == select_r &&
            writex_t == writex_b && biason_t == biason_b, "split copies agree");
      if (reading) check(row_l == row_r, "row counters agree");
      n_split++;
      if (loading) begin
        check(&rst_l && &rst_r, "all rows in reset while loading");
        check(writey_l == '0 && writex_t == '0, "no write while loading");
      end
      // reset release per row and per half
      for (int y = 0; y < L; y++) begin
        if (prev_rst_l[y] && !rst_l[y]) begin row_rst_fall_l[y] = cyc; n_release++; end
        if (prev_rst_r[y] && !rst_r[y]) row_rst_fall_r[y] = cyc;
      end
      if (exposing) begin
        if (int'(subframe) != prev_sub) begin
          phase_start[int'(subframe)] = cyc;
          prev_sub = int'(subframe);
        end
        if (rst_l != prev_rst_l && !(&prev_rst_l)) n_row_step++;
        if (writex_t != prev_wx && prev_wx != '0) n_col_step++;
        if (writey_l != '0 || writey_r != '0) begin
          for (int y = 0; y < L; y++) begin
            if (!(writey_l[y] || writey_r[y])) continue;
            for (int x = 0; x < L; x++) begin
              automatic logic wy = (x < H) ? writey_l[y] : writey_r[y];
              automatic logic wx = (y < H) ? writex_b[x] : writex_t[x];
              automatic logic bo = (y < H) ? biason_b[x] : biason_t[x];
              automatic logic rs = (x < H) ? rst_l[y]    : rst_r[y];
              if (wy && wx && bo) begin
                frame_writes++;
                if (frame_writes > L * L * (we - ws)) begin
                  failures++;
                  $display("FAIL: more pixel writes than one write window per pixel");
                  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
                  $finish;
                end
                wr_count[x][y]++;
                wr_last[x][y] = cyc;
                integ_start[x][y] = rs ? -2 : ((x < H) ? row_rst_fall_l[y] : row_rst_fall_r[y]);
                n_write++;
              end
            end
          end
        end
      end
      if (reading) begin
        automatic int sel = -1, nsel = 0;
        check(writey_l == '0 && writex_t == '0 && biason_t == '0, "write lines off during readout");
        for (int y = 0; y < L; y++) if (select_l[y]) begin sel = y; nsel++; end
        check(nsel == 1, "one row selected");
        if (sel != last_row) begin
          if (last_row >= 0) check(row_hold == trow, $sformatf("row %0d held %0d cycles", last_row, row_hold));
          check(sel == rows_read, $sformatf("row %0d selected, expected %0d", sel, rows_read));
          for (int x = 0; x < L; x++) readout[rows_read][x] = wr_last[x][sel];
          check_analog_row(sel);
          rows_read++; n_row_sel++;
          last_row = sel; row_hold = 0;
        end
        row_hold++;
      end
      prev_rst_l = rst_l; prev_rst_r = rst_r; prev_wy = writey_l; prev_wx = writex_t;
    end
  end

  // After a frame: exposure rules per pixel, then sub-frame demultiplexing.
  task automatic check_frame();
    automatic int ngroups = mx * my;
    automatic bit ok_cnt = 1, ok_start = 1, ok_end = 1;
    automatic int sub_pixels [256];
    automatic bit ok_sub = 1;
    check(frame_cycles == 3 + 4 * L + ngroups * tph + L * trow,
          $sformatf("frame took %0d cycles", frame_cycles));
    check(rows_read == L && row_hold == trow, "every row read out");
    for (int g = 0; g < ngroups; g++) check(phase_start[g] >= 0, $sformatf("phase %0d seen", g));
    foreach (wr_count[x, y]) begin
      automatic int g = grp(x, y);
      if (wr_count[x][y] != we - ws) ok_cnt = 0;
      if (integ_start[x][y] != phase_start[g]) ok_start = 0;
      if (wr_last[x][y] != phase_start[g] + we - 1) ok_end = 0;
    end
    check(ok_cnt, "each pixel written for the write window only");
    check(ok_start, "exposure starts at its group's phase");
    check(ok_end, "exposure ends at the end of the write window");
    // Demultiplex: which phase does each read-out stamp fall in?
    foreach (sub_pixels[i]) sub_pixels[i] = 0;
    for (int r = 0; r < L; r++)
      for (int x = 0; x < L; x++) begin
        automatic int s = -1;
        for (int g = 0; g < ngroups; g++)
          if (readout[r][x] >= phase_start[g] && readout[r][x] < phase_start[g] + tph) s = g;
        if (s != grp(x, r)) ok_sub = 0;
        if (s >= 0) sub_pixels[s]++;
      end
    check(ok_sub, "read-out frame splits into the grid's sub-frames");
    for (int g = 0; g < ngroups; g++) begin
      automatic int nx = (L - (g / my) + mx - 1) / mx;   // columns x with x mod mx == g / my
      automatic int ny = (L - (g % my) + my - 1) / my;   // rows y with y mod my == g mod my
      check(sub_pixels[g] == nx * ny, $sformatf("sub-frame %0d has %0d pixels, expected %0d",
                                                g, sub_pixels[g], nx * ny));
      if (sub_pixels[g] > 0) n_subframes++;
    end
  endtask

  task automatic run(input int ax, input int ay, input int p, input int s, input int e,
                     input int r, input int nframes);
    if (mx != 0 && (ax != mx || ay != my)) n_mask_change++;
    mx = ax; my = ay; tph = p; ws = s; we = e; trow = r;
    clear_frame();
    @(negedge clk);
    mask_x = MW'(ax); mask_y = MW'(ay);
    t_phase = 16'(p); wr_start = 16'(s); wr_end = 16'(e); t_row = 16'(r);
    continuous = (nframes > 1);
    start = 1'b1;
    @(posedge clk);
    in_frame = 1'b1;
    @(negedge clk) start = 1'b0;
    for (int f = 0; f < nframes; f++) begin
      if (f == nframes - 1) continuous = 1'b0;
      begin
        // A frame that overruns its expected length by 100 cycles is a hang.
        automatic int waited = 0;
        automatic int bound  = 3 + 4 * L + ax * ay * p + L * r + 100;
        while (!frame_done) begin
          @(negedge clk);
          waited++;
          if (waited > bound) begin
            failures++;
            $display("FAIL: no frame_done within %0d cycles", bound);
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
      end
      n_load++;
      check_frame();
      if (f < nframes - 1) begin
        n_restart++;
        clear_frame();
        frame_cycles = 0;   // the restart edge is the frame_done edge
      end
      @(negedge clk);
    end
    in_frame = 1'b0;
    repeat (3) @(negedge clk);
    check(!busy, "idle after the last frame");
  endtask

  initial begin
    cyc = 0; mx = 0; my = 0;
    prev_rst_l = '0; prev_rst_r = '0; prev_wy = '0; prev_wx = '0;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(4, 4, 8, 2, 6, 2, 1);    // the 4x4 example
    run(2, 2, 4, 0, 3, 2, 1);    // 2x2 grid
    run(3, 5, 5, 1, 4, 2, 2);    // 3x5, two frames back to back
    check(n_load > 0,        $sformatf("pattern loads: %0d", n_load));
    check(n_row_step > 0,    $sformatf("row steps: %0d", n_row_step));
    check(n_col_step > 0,    $sformatf("column steps: %0d", n_col_step));
    check(n_write > 0,       $sformatf("pixel writes: %0d", n_write));
    check(n_release > 0,     $sformatf("reset releases: %0d", n_release));
    check(n_row_sel > 0,     $sformatf("rows read: %0d", n_row_sel));
    check(n_subframes > 0,   $sformatf("sub-frames rebuilt: %0d", n_subframes));
    check(n_mask_change > 0, $sformatf("mask changes: %0d", n_mask_change));
    check(n_restart > 0,     $sformatf("continuous restarts: %0d", n_restart));
    check(n_split > 0,       $sformatf("split-line comparisons: %0d", n_split));
    check(n_analog > 0,      $sformatf("analog pixel readings: %0d", n_analog));
    $display("mechanisms: loads=%0d row_steps=%0d col_steps=%0d writes=%0d releases=%0d rows_read=%0d subframes=%0d mask_changes=%0d restarts=%0d analog=%0d",
             n_load, n_row_step, n_col_step, n_write, n_release, n_row_sel, n_subframes, n_mask_change, n_restart, n_analog);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
