// lfsr4_galois: 4-bit Galois LFSR producing the DEM rotation index.
//
// Polynomial x^4 + x^3 + 1: each enabled clock the state shifts right and,
// when the bit shifted out is 1, the feedback mask 4'b1100 is XORed in. The
// sequence visits all 15 non-zero states; reset loads 4'b0001. The 4-bit
// Galois structure follows the design description; the polynomial and seed
// are this design's choice.
module lfsr4_galois (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  output logic [3:0] state
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= 4'b0001;
    else if (en) state <= (state >> 1) ^ (state[0] ? 4'b1100 : 4'b0000);
  end
endmodule
