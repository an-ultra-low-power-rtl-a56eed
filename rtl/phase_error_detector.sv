// phase_error_detector: difference-mode digital phase error detection with
// DTC phase prediction.
//
// Runs on CKR, the reference clock re-timed to the variable clock. Each cycle:
//  * integer path: the variable counter is sampled; the difference of two
//    successive samples (edges counted over one reference period) is
//    subtracted from the integer FCW plus the carry of the fractional
//    reference accumulator, giving the integer frequency error fe. fe is
//    accumulated into the integer phase error phe_int, which zph clears
//    (zero-phase restart at a bank switch);
//  * fractional path: the FCW fraction is accumulated; for the next
//    reference edge the DTC must delay the reference by p = 1 - frac of a
//    CKVD2 period, so that the delayed reference lines up with a variable
//    edge. p * inv_kdtc is the delay in coarse steps; its integer part is the
//    coarse word and its fraction times cf_ratio (coarse/fine step ratio)
//    the fine word. With ext_en the DTC words come from SPI instead;
//  * the bang-bang bit is encoded as +kres / -kres (kres = fine DTC step
//    over the CKVD2 period, in 2^-16 cycles) and added to phe_int to give the
//    total phase error phe (signed 12.16 CKVD2 cycles);
//  * lock is declared after LOCK_CYCLES consecutive cycles with fe = 0 and
//    phe_int = 0.
// Latency: phe and the DTC words are registered, one CKR cycle after the
// counter sample and bang-bang bit they come from. The count bookkeeping, the
// carry handling, the prediction and the bang-bang encoding follow the design
// description; the coarse/fine split, saturation and lock rule are this
// design's choice.
module phase_error_detector
  import adpll_pkg::*;
#(
  parameter int unsigned LOCK_CYCLES = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [FCW_W-1:0]        fcw,
  input  logic [CNT_W-1:0]        count,
  input  logic                    bb,
  input  logic [KDTC_W-1:0]       inv_kdtc,
  input  logic [5:0]              cf_ratio,
  input  logic [KRES_W-1:0]       kres,
  input  logic                    zph,
  input  logic                    ext_en,
  input  logic [3:0]              ext_coarse,
  input  logic [3:0]              ext_fine,
  output logic signed [PHE_W-1:0] phe,
  output logic signed [CNT_W-1:0] fe,
  output logic [COARSE_W-1:0]     dtc_coarse,
  output logic [FINE_W-1:0]       dtc_fine,
  output logic [16:0]             p_cur,      // prediction behind the current DTC word
  output logic                    locked
);
  timeunit 1ps; timeprecision 1fs;

  localparam logic signed [PHE_INT_W-1:0] PHI_MAX = {1'b0, {(PHE_INT_W-1){1'b1}}};
  localparam logic signed [PHE_INT_W-1:0] PHI_MIN = {1'b1, {(PHE_INT_W-1){1'b0}}};

  logic [CNT_W-1:0]             cnt_prev;
  logic [FCW_FRAC_W-1:0]        frac;
  logic                         carry_q;
  logic signed [PHE_INT_W-1:0]  phe_int, phe_int_n;
  logic signed [PHE_INT_W:0]    phe_sum;
  logic [FCW_FRAC_W:0]          frac_sum;
  logic [16:0]                  p_next;
  logic [32:0]                  x;
  logic [21:0]                  fine_prod;
  logic [5:0]                   fine_round;
  logic [COARSE_W-1:0]          coarse_n;
  logic [FINE_W-1:0]            fine_n;
  logic [$clog2(LOCK_CYCLES+1)-1:0] lock_cnt;

  // integer path
  always_comb begin
    fe        = CNT_W'(fcw[FCW_W-1:FCW_FRAC_W]) + CNT_W'(carry_q) - (count - cnt_prev);
    phe_sum   = $signed({phe_int[PHE_INT_W-1], phe_int}) + $signed({{(PHE_INT_W+1-CNT_W){fe[CNT_W-1]}}, fe});
    if (phe_sum > (PHE_INT_W+1)'(PHI_MAX))      phe_int_n = PHI_MAX;
    else if (phe_sum < $signed({PHI_MIN[PHE_INT_W-1], PHI_MIN})) phe_int_n = PHI_MIN;
    else                                         phe_int_n = phe_sum[PHE_INT_W-1:0];
    if (zph) phe_int_n = '0;
  end

  // fractional path: prediction for the next reference edge
  always_comb begin
    frac_sum   = {1'b0, frac} + {1'b0, fcw[FCW_FRAC_W-1:0]};
    p_next     = 17'h10000 - {1'b0, frac_sum[FCW_FRAC_W-1:0]};
    x          = p_next * inv_kdtc;                 // 5.28 coarse steps
    coarse_n   = x[31:28];
    fine_prod  = x[27:12] * cf_ratio;               // 6.16 fine steps
    fine_round = 6'((fine_prod + 22'h8000) >> 16);
    fine_n     = (fine_round > 6'd31) ? 5'd31 : fine_round[FINE_W-1:0];
    if (ext_en) begin
      coarse_n = ext_coarse;
      fine_n   = {1'b0, ext_fine};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_prev   <= '0;
      frac       <= '0;
      carry_q    <= 1'b0;
      phe_int    <= '0;
      phe        <= '0;
      dtc_coarse <= '0;
      dtc_fine   <= '0;
      p_cur      <= 17'h10000;
      lock_cnt   <= '0;
      locked     <= 1'b0;
    end else begin
      cnt_prev   <= count;
      frac       <= frac_sum[FCW_FRAC_W-1:0];
      carry_q    <= frac_sum[FCW_FRAC_W];
      phe_int    <= phe_int_n;
      phe        <= {phe_int_n, PHE_FRAC_W'(0)}
                    + (bb ? PHE_W'(kres) : -PHE_W'(kres));
      dtc_coarse <= coarse_n;
      dtc_fine   <= fine_n;
      p_cur      <= p_next;
      if (fe == '0 && phe_int_n == '0 && !zph) begin
        if (lock_cnt == LOCK_CYCLES[$bits(lock_cnt)-1:0]) locked <= 1'b1;
        else lock_cnt <= lock_cnt + 1'b1;
      end else begin
        lock_cnt <= '0;
        locked   <= 1'b0;
      end
    end
  end
endmodule
