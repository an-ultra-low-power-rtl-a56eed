// tx_interface: two-point frequency modulation.
//
// The signed 10-bit TX data drives two paths that together give an all-pass
// response to the modulation:
//   reference path: the data is added to the FCW at its least significant
//     fractional bit (one LSB = FREF/2^16 of CKVD2 frequency), no scaling
//     needed since the reference is PVT-free;
//   DCO path: the data is multiplied by inv_kdcomod, the reciprocal of the
//     tracking-bank gain in units of 2^-9 tracking LSB per data LSB, and
//     handed to the loop filter as a signed tracking offset with 5
//     fractional bits (the sigma-delta resolution).
// With mod_on = 0 both paths are zero. Both outputs are registered on CKR,
// so they reach the loop in the same reference cycle. Widths follow the
// design description; the inv_kdcomod scaling is this design's choice.
module tx_interface
  import adpll_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [FCW_W-1:0]        fcw,
  input  logic signed [TXD_W-1:0] tx_data,
  input  logic                    mod_on,
  input  logic [5:0]              inv_kdcomod,
  output logic [FCW_W-1:0]        fcw_mod,
  output logic signed [15:0]      mod_trk     // tracking LSBs, 5 fractional bits
);
  timeunit 1ps; timeprecision 1fs;

  logic signed [16:0] prod;
  assign prod = tx_data * $signed({1'b0, inv_kdcomod});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fcw_mod <= '0;
      mod_trk <= '0;
    end else begin
      fcw_mod <= mod_on ? fcw + FCW_W'(tx_data) : fcw;
      mod_trk <= mod_on ? 16'(prod >>> 4) : '0;
    end
  end
endmodule
