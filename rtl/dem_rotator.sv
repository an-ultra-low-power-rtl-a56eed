// dem_rotator: binary-to-thermometer DTC encoder with rotation (DEM).
//
// The binary code selects how many of the N unit delay cells are switched to
// their long-delay state. Without rotation cells 0..code-1 are on. With
// rotation enabled the thermometer word is circularly shifted right by the
// rotation index (from the LFSR), so a different set of equally weighted
// cells realises the same delay each reference period and the cells'
// mismatch is scrambled into noise instead of periodic spurs. Purely
// combinational. Codes above N are clamped to N.
module dem_rotator #(
  parameter int unsigned N    = 16,
  parameter int unsigned CW   = 5,   // code width, must hold N
  parameter int unsigned IDXW = 4
) (
  input  logic [CW-1:0]   code,
  input  logic [IDXW-1:0] idx,
  input  logic            rot_en,
  output logic [N-1:0]    therm
);
  timeunit 1ps; timeprecision 1fs;

  logic [N-1:0] plain;
  logic [2*N-1:0] doubled;
  int unsigned shift;

  always_comb begin
    for (int i = 0; i < N; i++) plain[i] = (CW'(i) < code);
    shift   = rot_en ? (int'(idx) % N) : 0;
    doubled = {plain, plain} >> shift;
    therm   = doubled[N-1:0];
  end
endmodule
