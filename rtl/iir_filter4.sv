// iir_filter4: four cascaded first-order IIR stages on the phase error.
//
// Each stage computes y <= y + (x - y) * 2^-lambda, a single-pole low-pass
// with attenuation factor 2^-lambda, equivalent to the s-domain response
// (1 + s/fR) / (1 + s/(lambda fR)). Four stages give an extra -80 dB/decade
// roll-off of reference and quantisation noise in the proportional path.
// With en = 0 the input passes straight through and the stage states
// follow it, so enabling the filter causes no step. One common lambda is
// used for all stages (the register table holds one lambda field).
module iir_filter4 #(
  parameter int unsigned W = 28
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [2:0]          lambda,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  timeunit 1ps; timeprecision 1fs;

  logic signed [W-1:0] st [4];
  logic signed [W-1:0] in_s [4];

  always_comb begin
    in_s[0] = x;
    for (int i = 1; i < 4; i++) in_s[i] = st[i-1];
    y = en ? st[3] : x;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) st[i] <= '0;
    end else begin
      for (int i = 0; i < 4; i++)
        st[i] <= en ? st[i] + ((in_s[i] - st[i]) >>> lambda) : x;
    end
  end
endmodule
