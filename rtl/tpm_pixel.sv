// tpm_pixel -- behavioural model (not synthesizable) of the 8-transistor
// TPM pixel.
//
// The pixel is a 3T active pixel with a partially pinned photodiode,
// extended with an in-pixel storage capacitor. Its parts:
//   * RST switch: while RST is high the photodiode is held at VRESET;
//     when it is low the photodiode integrates, and its voltage falls by
//     CG_UV microvolts per collected electron.
//   * first source follower, powered by BIASON, and the WRITEX/WRITEY
//     switches in series: while all three are on, the storage capacitor
//     follows the photodiode; when any opens, it holds the last value.
//   * second source follower and the SELECT switch: while SELECT is high
//     the stored voltage drives the column line.
// The signal saturates at the full-well charge. Charge comes from
// `photo_rate` (electrons per ns), integrated in fixed STEP_NS time steps.
// Source-follower gain and offset, leakage and noise are not modelled; the
// followers are taken as ideal unity buffers. When not selected, the column
// output reads 0.0 and col_drive is low.
//
// The document gives the transistor-level structure, the conversion gain
// (17 uV/e-) and the full-well capacity (about 52.5 ke-). VRESET and the
// ideal followers are this model's own choices.
`timescale 1ns / 1ps
module tpm_pixel #(
  parameter real CG_UV     = 17.0,     // conversion gain, uV per electron
  parameter real FULL_WELL = 52500.0,  // electrons
  parameter real VRESET    = 2.0,      // photodiode reset level, V
  parameter real STEP_NS   = 1.0       // integration time step, ns
) (
  input  logic rst,
  input  logic biason,
  input  logic writex,
  input  logic writey,
  input  logic select,
  input  real  photo_rate,   // electrons per ns reaching the photodiode
  output real  v_pd,         // photodiode node voltage
  output real  v_store,      // storage capacitor voltage
  output real  v_col,        // column output when selected
  output logic col_drive     // this pixel is driving the column line
);

  localparam real V_SAT = VRESET - FULL_WELL * CG_UV * 1.0e-6;

  real pd, st;

  initial begin
    pd = VRESET;
    st = VRESET;
  end

  always begin
    #(STEP_NS);
    if (rst) pd = VRESET;
    else begin
      pd = pd - photo_rate * STEP_NS * CG_UV * 1.0e-6;
      if (pd < V_SAT) pd = V_SAT;
    end
    if (biason && writex && writey) st = pd;
  end

  assign v_pd      = pd;
  assign v_store   = st;
  assign col_drive = select;
  assign v_col     = select ? st : 0.0;

endmodule
