// dtc_coarse_fine: behavioural model of the coarse-fine digital-to-time
// converter (not synthesizable; it stands for an inverter delay line).
//
// A single delay line of 16 coarse current-starved cells and 32 fine
// shunt-capacitor cells. Each cell has two states; switching a cell on adds
// its step to the delay, so only the difference between the two states
// matters and the fixed delay of the line is an irrelevant phase offset.
// The delay of an edge of fref_in is
//     T_FIXED + sum(on coarse cells' steps) + sum(on fine cells' steps)
// Nominal steps are 58 ps and 2 ps as in the design description. Each cell
// can be given a deterministic mismatch of up to +-MISMATCH_PCT percent of
// its step (a fixed pattern over the cell index), which makes the DEM
// rotation observable. The thermometer words must be stable at the input
// edge; both edges are delayed by the same amount.
module dtc_coarse_fine #(
  parameter real T_FIXED_PS   = 150.0,
  parameter real T_COARSE_PS  = 58.0,
  parameter real T_FINE_PS    = 2.0,
  parameter real MISMATCH_PCT = 0.0
) (
  input  logic        fref_in,
  input  logic [15:0] coarse_th,
  input  logic [31:0] fine_th,
  output logic        fref_dly
);
  timeunit 1ps; timeprecision 1fs;

  real step_c [16];
  real step_f [32];

  function automatic real pattern(input int i);
    // fixed pseudo-random pattern in [-1, 1]
    return (real'((i * 37 + 11) % 23) - 11.0) / 11.0;
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) step_c[i] = T_COARSE_PS * (1.0 + MISMATCH_PCT / 100.0 * pattern(i));
    for (int i = 0; i < 32; i++) step_f[i] = T_FINE_PS * (1.0 + MISMATCH_PCT / 100.0 * pattern(i + 16));
    fref_dly = 1'b0;
  end

  function automatic real delay_now();
    real d = T_FIXED_PS;
    for (int i = 0; i < 16; i++) if (coarse_th[i]) d += step_c[i];
    for (int i = 0; i < 32; i++) if (fine_th[i])   d += step_f[i];
    return d;
  endfunction

  always @(fref_in) fref_dly <= #(delay_now()) fref_in;
endmodule
