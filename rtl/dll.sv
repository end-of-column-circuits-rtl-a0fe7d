// dll: delay-locked loop that gives the fine time of the TDC.
//
// A 32-cell voltage-controlled delay line (vcdl, behavioural model) is
// locked so that its total delay equals one period of the 320 MHz reference
// clock (3.125 ns), giving 32 taps about 97.66 ps apart. The loop is the
// design's: bang-bang phase detector comparing the reference with the last
// cell's output, charge pump, capacitor on the control voltage. The detector
// is synthesizable logic; the rest is the analog model, so this module is a
// behavioural model as a whole. Lock from start-up takes about
// (3125 - INIT_DELAY_PS)/STEP_PS reference cycles (113 with the defaults);
// locked, the total delay dithers by one step.
//
// Ports: ref_clk, rst (start-up), taps (t0..t31 to the hit registers).
`timescale 1ps/1fs
module dll #(
  parameter int  N_CELLS       = 32,
  parameter real STEP_PS       = 10.0,
  parameter real INIT_DELAY_PS = 2000.0
) (
  input  logic               ref_clk,
  input  logic               rst,
  output logic [N_CELLS-1:0] taps
);
  logic up, down;

  bb_phase_detector u_pd (
    .ref_clk (ref_clk),
    .rst     (rst),
    .fb      (taps[N_CELLS-1]),
    .up      (up),
    .down    (down)
  );

  vcdl #(
    .N_CELLS       (N_CELLS),
    .STEP_PS       (STEP_PS),
    .INIT_DELAY_PS (INIT_DELAY_PS)
  ) u_vcdl (
    .ref_clk (ref_clk),
    .rst     (rst),
    .up      (up),
    .down    (down),
    .taps    (taps)
  );
endmodule
