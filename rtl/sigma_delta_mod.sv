// sigma_delta_mod: first-order sigma-delta modulator for the tracking bank.
//
// A W-bit carry-propagate accumulator adds the fractional part of the
// tracking word every dithering clock; its carry-out is a one-bit stream
// whose average equals frac / 2^W and which switches one extra tracking unit
// capacitor. The dithering clock is either CKR or CKVD2/16 (selected outside);
// frac comes from the CKR domain and is treated as quasi-static, so it is
// registered locally first. Width 5 follows the design description.
module sigma_delta_mod #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] frac,
  output logic         dither
);
  timeunit 1ps; timeprecision 1fs;

  logic [W-1:0] frac_q, acc;
  logic [W:0]   sum;

  assign sum = {1'b0, acc} + {1'b0, frac_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frac_q <= '0;
      acc    <= '0;
      dither <= 1'b0;
    end else begin
      frac_q <= frac;
      acc    <= sum[W-1:0];
      dither <= sum[W];
    end
  end
endmodule
