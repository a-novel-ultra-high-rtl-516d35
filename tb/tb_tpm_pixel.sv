// tb_tpm_pixel -- self-checking test of the behavioural 8T TPM pixel.
//
// Expected voltages are worked out here from the conversion gain (17 uV per
// electron), the full-well charge (52.5 ke-) and the 2.0 V reset level:
//   * RST high holds the photodiode at 2.0 V;
//   * 100 ns of integration at 100 e-/ns lowers it by 100*100*17e-6 = 0.17 V;
//   * with BIASON, WRITEX and WRITEY all high the storage node follows the
//     photodiode; opening WRITEY (or WRITEX) freezes it while the photodiode
//     keeps integrating or is reset;
//   * without BIASON nothing is written;
//   * SELECT puts the stored voltage on the column;
//   * a strong light saturates at 2.0 - 52500*17e-6 = 1.1075 V.
// Checks are made half a step after the model's update instants, with a
// tolerance of one time step of charge.
`timescale 1ns / 1ps
module tb_tpm_pixel;
  logic rst = 1'b1, biason = 1'b0, writex = 1'b0, writey = 1'b0, select = 1'b0;
  real  photo_rate = 0.0;
  real  v_pd, v_store, v_col;
  logic col_drive;
  int checks = 0, failures = 0;

  tpm_pixel dut (.rst, .biason, .writex, .writey, .select, .photo_rate,
                 .v_pd, .v_store, .v_col, .col_drive);

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b < tol) && (b - a < tol);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s (v_pd=%f v_store=%f v_col=%f)", $time, what, v_pd, v_store, v_col);
    end
  endtask

  real held;

  initial begin
    #10.5;
    check(near(v_pd, 2.0, 1e-9), "reset level");
    // Integrate 100 ns at 100 e-/ns, writing into the storage node.
    photo_rate = 100.0;
    biason = 1'b1; writex = 1'b1; writey = 1'b1;
    rst = 1'b0;
    #100;
    check(near(v_pd, 2.0 - 0.17, 0.002), "100 ns integration drops 0.17 V");
    check(near(v_store, v_pd, 1e-9), "storage follows photodiode while written");
    // Close the write path: storage holds, photodiode goes on falling.
    writey = 1'b0;
    held = v_store;
    #50;
    check(near(v_store, held, 1e-9), "storage holds after WRITEY opens");
    check(near(v_pd, held - 0.085, 0.002), "photodiode keeps integrating");
    // Reset the photodiode: storage unaffected.
    rst = 1'b1;
    #5;
    check(near(v_pd, 2.0, 1e-9), "photodiode reset");
    check(near(v_store, held, 1e-9), "storage unaffected by reset");
    // Readout through SELECT.
    check(v_col == 0.0 && !col_drive, "column idle while not selected");
    select = 1'b1;
    #1;
    check(near(v_col, held, 1e-9) && col_drive, "SELECT drives the stored value");
    select = 1'b0;
    // Write path needs BIASON: without it the storage stays.
    rst = 1'b0; biason = 1'b0; writex = 1'b1; writey = 1'b1;
    #20;
    check(near(v_store, held, 1e-9), "no write without BIASON");
    biason = 1'b1;
    #2;
    check(near(v_store, v_pd, 1e-9), "write resumes with BIASON");
    // WRITEX alone open also blocks the write.
    writex = 1'b0;
    held = v_store;
    #10;
    check(near(v_store, held, 1e-9), "storage holds after WRITEX opens");
    // Saturation at full well.
    photo_rate = 1.0e5;
    #10;
    check(near(v_pd, 2.0 - 52500.0 * 17.0e-6, 1e-6), "saturates at full well");
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
