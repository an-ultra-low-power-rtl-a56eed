// div2: divide-by-two of the DCO output.
//
// The silicon divider is a loop of four transmission gates and inverters
// driven directly by the differential DCO swing; logically it is a toggle
// flip-flop, which is what this module is. CKVD2 toggles on every rising
// edge of CKV, so it has half the DCO frequency and a 50 % duty cycle. The
// quadrature outputs of the silicon divider are not used by this design.
// The asynchronous reset, which fixes the initial phase, is this design's
// choice.
module div2 (
  input  logic ckv,
  input  logic rst_n,
  output logic ckvd2
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge ckv or negedge rst_n) begin
    if (!rst_n) ckvd2 <= 1'b0;
    else        ckvd2 <= ~ckvd2;
  end
endmodule
