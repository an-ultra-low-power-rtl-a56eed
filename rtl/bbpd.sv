// bbpd: bang-bang phase detector.
//
// A single flip-flop (a TSPC DFF in silicon) clocked by the frozen variable
// edge CKVD2F samples the compensated delayed reference REF_CMP. bb = 1 means
// the reference edge had already arrived, i.e. the variable clock is late and
// the DCO must speed up; bb = 0 means the variable clock is early. The result
// is held until the next frozen edge and is read by the CKR-domain logic two
// CKVD2 periods later, which leaves ample time for metastability to resolve.
module bbpd (
  input  logic ckvd2f,
  input  logic ref_cmp,
  input  logic rst_n,
  output logic bb
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge ckvd2f or negedge rst_n) begin
    if (!rst_n) bb <= 1'b0;
    else        bb <= ref_cmp;
  end
endmodule
