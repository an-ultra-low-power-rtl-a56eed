// loop_filter: digital loop filter and bank control for the three DCO banks.
//
// One filter per capacitor bank, selected by bank_sel:
//  * PVT and acquisition banks: type-I (proportional only),
//        otw = mem + round(phe * kdco * 2^-alpha)
//  * tracking bank: type-II, proportional plus integral,
//        trk = mem + iir(phe) * kdco_t * 2^-alpha_t + sum(phe * kdco_t * 2^-rho)
//    where iir() is an optional chain of four one-pole IIR stages on the
//    proportional path. The tracking word keeps 5 fractional bits for the
//    sigma-delta modulator, and the DCO-path modulation offset mod_trk from
//    the TX interface is added to it in every mode.
// kdco * 2^-alpha is the loop gain alpha times fR/KDCO, i.e. bank LSBs per
// CKVD2 cycle of phase error.
// Bank control: a bank is only updated while selected; once the sequencer
// moves on, its word is frozen. Banks not yet reached, and all banks in open
// loop (BANK_OPEN), take their SPI words mem_*. A change of bank_sel raises
// zph for one cycle; it clears the phase error accumulator in the phase
// detector (zero-phase restart), and the filters ignore phe in that cycle.
// Outputs are registered on CKR. Filter types per bank, the IIR option,
// freezing, zero-phase restart and open loop follow the design description;
// the gain-field encodings, fixed-point formats, rounding and saturation
// are this design's choice.
module loop_filter
  import adpll_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  bank_sel_e               bank_sel,
  input  logic signed [PHE_W-1:0] phe,
  input  logic [PVT_W-1:0]        mem_pvt,
  input  logic [ACQ_W-1:0]        mem_acq,
  input  logic [TRK_W-1:0]        mem_trk,
  input  logic [2:0]              kdco_p,
  input  logic [1:0]              alpha_p,
  input  logic [2:0]              kdco_a,
  input  logic [1:0]              alpha_a,
  input  logic [7:0]              kdco_t,
  input  logic [2:0]              alpha_t,
  input  logic [4:0]              rho,
  input  logic                    iir_en,
  input  logic [2:0]              lambda,
  input  logic signed [15:0]      mod_trk,
  output logic [PVT_W-1:0]        otw_pvt,
  output logic [ACQ_W-1:0]        otw_acq,
  output logic [TRK_W-1:0]        otw_trk,
  output logic [SD_W-1:0]         trk_frac,
  output logic                    zph
);
  timeunit 1ps; timeprecision 1fs;

  localparam int LW = 44;
  localparam logic signed [LW-1:0] HALF = LW'(1) <<< (PHE_FRAC_W - 1);
  localparam logic signed [LW-1:0] IMAX = LW'(1) <<< (TRK_W + PHE_FRAC_W + 1);

  bank_sel_e              sel_q;
  logic signed [PHE_W-1:0] phe_eff, phe_iir;
  logic signed [LW-1:0]   p_pvt, p_acq, p_trk, prod_t, prod_ti, integ, integ_n, trk_sum;
  logic signed [LW-1:0]   pvt_sum, acq_sum;
  logic [PVT_W-1:0]       pvt_n;
  logic [ACQ_W-1:0]       acq_n;
  logic [TRK_W-1:0]       trk_n;
  logic [SD_W-1:0]        frac_n;

  assign zph     = (bank_sel != sel_q);
  assign phe_eff = zph ? '0 : phe;

  iir_filter4 #(.W(PHE_W)) u_iir (
    .clk, .rst_n, .en(iir_en), .lambda, .x(phe_eff), .y(phe_iir)
  );

  always_comb begin
    // type-I banks
    p_pvt   = (LW'(phe_eff) * $signed({1'b0, kdco_p})) >>> alpha_p;
    p_acq   = (LW'(phe_eff) * $signed({1'b0, kdco_a})) >>> alpha_a;
    pvt_sum = $signed(LW'(mem_pvt)) + ((p_pvt + HALF) >>> PHE_FRAC_W);
    acq_sum = $signed(LW'(mem_acq)) + ((p_acq + HALF) >>> PHE_FRAC_W);
    pvt_n   = (pvt_sum < 0) ? '0 : (pvt_sum > LW'((1 << PVT_W) - 1)) ? '1 : pvt_sum[PVT_W-1:0];
    acq_n   = (acq_sum < 0) ? '0 : (acq_sum > LW'((1 << ACQ_W) - 1)) ? '1 : acq_sum[ACQ_W-1:0];

    // type-II tracking bank
    prod_t  = LW'(phe_iir) * $signed({1'b0, kdco_t});
    prod_ti = LW'(phe_eff) * $signed({1'b0, kdco_t});
    p_trk   = prod_t >>> alpha_t;
    integ_n = integ + (prod_ti >>> rho);
    if (integ_n > IMAX)  integ_n = IMAX;
    if (integ_n < -IMAX) integ_n = -IMAX;
    if (bank_sel == BANK_TRK)
      trk_sum = (LW'(mem_trk) <<< PHE_FRAC_W) + p_trk + integ_n;
    else
      trk_sum = (LW'(mem_trk) <<< PHE_FRAC_W);
    trk_sum = trk_sum + (LW'(mod_trk) <<< (PHE_FRAC_W - SD_W));
    if (trk_sum < 0) begin
      trk_n = '0; frac_n = '0;
    end else if ((trk_sum >>> PHE_FRAC_W) > LW'((1 << TRK_W) - 1)) begin
      trk_n = '1; frac_n = '0;
    end else begin
      trk_n  = trk_sum[PHE_FRAC_W +: TRK_W];
      frac_n = trk_sum[PHE_FRAC_W-1 -: SD_W];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q    <= BANK_OPEN;
      otw_pvt  <= '0;
      otw_acq  <= '0;
      otw_trk  <= '0;
      trk_frac <= '0;
      integ    <= '0;
    end else begin
      sel_q <= bank_sel;
      unique case (bank_sel)
        BANK_OPEN: begin otw_pvt <= mem_pvt; otw_acq <= mem_acq; end
        BANK_PVT:  begin otw_pvt <= pvt_n;   otw_acq <= mem_acq; end
        BANK_ACQ:  begin                     otw_acq <= acq_n;   end
        default:   ;
      endcase
      otw_trk  <= trk_n;
      trk_frac <= frac_n;
      integ    <= (bank_sel == BANK_TRK) ? integ_n : '0;
    end
  end
endmodule
