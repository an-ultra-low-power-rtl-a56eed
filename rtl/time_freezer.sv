// time_freezer: behavioural model of the clock-gating "time freezer"
// (custom gates in silicon).
//
// The rising edge of the delayed reference fref_dly opens a window onto
// CKVD2. The first CKVD2 high level seen through the window becomes the
// frozen variable edge ckvd2f: if CKVD2 is already high when the window
// opens (the variable edge came slightly early), ckvd2f rises as soon as the
// window opens; otherwise it rises with the next CKVD2 rising edge. A dummy
// copy of the gate path delays fref_dly by the same gate delay (plus a
// small offset T_OFS_PS) to give ref_cmp, so the bang-bang flip-flop
// compares like with like. ckvd2f is a single pulse, so the high-rate clock
// reaches the detector only once per reference period. Two CKVD2 periods
// after the frozen edge the re-timed reference CKR rises (T_GATE_PS after a
// CKVD2 rising edge, so the CKVD2-domain counter has settled); CKR falls at
// the next fref_dly rising edge. The window/freeze/two-period behaviour
// follows the design description; the gate delays are assumed values.
module time_freezer #(
  parameter real T_GATE_PS = 30.0,
  parameter real T_OFS_PS  = 3.0
) (
  input  logic fref_dly,
  input  logic ckvd2,
  output logic ckvd2f,
  output logic ref_cmp,
  output logic ckr
);
  timeunit 1ps; timeprecision 1fs;

  initial begin
    ckvd2f  = 1'b0;
    ref_cmp = 1'b0;
    ckr     = 1'b0;
  end

  always @(negedge fref_dly) ref_cmp <= #(T_GATE_PS + T_OFS_PS) 1'b0;

  always @(posedge fref_dly) begin
    ref_cmp <= #(T_GATE_PS + T_OFS_PS) 1'b1;
    ckr     <= #(T_GATE_PS) 1'b0;
    if (!ckvd2) @(posedge ckvd2);
    ckvd2f <= #(T_GATE_PS) 1'b1;
    @(negedge ckvd2);
    ckvd2f <= #(T_GATE_PS) 1'b0;
    @(posedge ckvd2);
    @(posedge ckvd2);
    ckr <= #(T_GATE_PS) 1'b1;
  end
endmodule
