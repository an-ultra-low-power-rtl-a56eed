// ckv_counter: variable phase counter.
//
// Counts rising edges of CKVD2 (the DCO output divided by two) in a 7-bit
// synchronous binary counter that wraps modulo 128; every flop is clocked by
// CKVD2, so all bits change together and the count can be sampled by the
// re-timed reference clock CKR without per-bit delay compensation. The
// low-speed logic takes differences of successive samples, so the wrap is
// harmless. Bit 3 toggles at CKVD2/16 and can serve as the sigma-delta
// dithering clock. The 7-bit width and synchronous structure follow the
// design description; the asynchronous reset is this design's choice.
module ckv_counter #(
  parameter int unsigned WIDTH = 7
) (
  input  logic             ckvd2,
  input  logic             rst_n,
  output logic [WIDTH-1:0] count
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge ckvd2 or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;
  end
endmodule
