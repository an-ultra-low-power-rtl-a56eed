// kdtc_lms: sign-sign LMS estimation of the DTC gain normaliser inv_kdtc.
//
// inv_kdtc (unsigned 4.12, coarse DTC steps per CKVD2 period) scales the
// predicted fractional phase into a DTC word. If it is wrong, the residual
// timing error seen by the bang-bang detector correlates with the predicted
// fraction p: too small a gain leaves the variable edge late (bb = 1) for
// large p and early for small p. Each CKR cycle with cal_en set the estimate
// moves by one step towards removing that correlation:
//     inv += step * sign(bb) * sign(p - 1/2),   step = 2^(11-mu) LSBs of the
//     4.12 output (8 internal guard bits keep steps below one LSB)
// With cal_en clear the estimate follows the SPI value init_val. The update
// uses the bb and p of the same reference edge. LMS calibration is named by
// the design description; the sign-sign form and step encoding are this
// design's choice.
module kdtc_lms
  import adpll_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cal_en,
  input  logic [KDTC_W-1:0] init_val,
  input  logic [3:0]        mu,
  input  logic              bb,
  input  logic [16:0]       p,         // predicted fraction, 1.16, in (0,1]
  output logic [KDTC_W-1:0] inv_kdtc
);
  timeunit 1ps; timeprecision 1fs;

  localparam int GUARD = 8;
  localparam int AW    = KDTC_W + GUARD;

  logic [AW-1:0] acc;
  logic [AW-1:0] step;
  logic          p_high, up;

  assign p_high   = p > 17'h08000;
  assign up       = (bb == p_high);
  assign step     = AW'(1) << (5'd19 - {1'b0, mu});
  assign inv_kdtc = acc[AW-1:GUARD];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= {init_val, GUARD'(0)};
    else if (!cal_en) acc <= {init_val, GUARD'(0)};
    else if (up) acc <= (acc > {AW{1'b1}} - step) ? {AW{1'b1}} : acc + step;
    else         acc <= (acc < step) ? '0 : acc - step;
  end
endmodule
