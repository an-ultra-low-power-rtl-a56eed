// adpll_digital: low-speed digital part of the ADPLL, clocked by CKR.
//
// Wires together the bank sequencer, the TX interface for two-point
// modulation, the phase error detector with DTC phase prediction, the DTC
// gain (inv_kdtc) LMS calibration, the loop filter for the three DCO banks,
// the LFSR-driven DEM encoders for the coarse (16-cell) and fine (32-cell)
// DTC banks, and the sigma-delta modulator of the tracking-bank fraction.
// Data flow per CKR cycle: counter sample and bang-bang bit -> phase error
// (registered) -> loop filter (registered) -> DCO words; fractional
// reference phase -> DTC words (registered) -> thermometer codes
// (combinational, rotated when DEM is on). The DTC words are updated right
// after CKR, long before the next reference edge. The sigma-delta modulator
// is clocked by CKR or by CKVD2/16 (count[3]), chosen by cfg.sd_clk_sel.
// Calibration of inv_kdtc runs only while the tracking bank is active.
module adpll_digital
  import adpll_pkg::*;
(
  input  logic                    ckr,
  input  logic                    rst_n,
  input  adpll_cfg_t              cfg,
  input  logic signed [TXD_W-1:0] tx_data,
  input  logic [CNT_W-1:0]        count,
  input  logic                    bb,
  output logic [N_COARSE-1:0]     dtc_coarse_th,
  output logic [N_FINE-1:0]       dtc_fine_th,
  output logic [PVT_W-1:0]        otw_pvt,
  output logic [ACQ_W-1:0]        otw_acq,
  output logic [TRK_W-1:0]        otw_trk,
  output logic                    trk_dither,
  output adpll_status_t           status
);
  timeunit 1ps; timeprecision 1fs;

  bank_sel_e               bank_sel;
  logic [FCW_W-1:0]        fcw_mod;
  logic signed [15:0]      mod_trk;
  logic [KDTC_W-1:0]       inv_kdtc;
  logic signed [PHE_W-1:0] phe;
  logic signed [CNT_W-1:0] fe;
  logic [COARSE_W-1:0]     dtc_coarse;
  logic [FINE_W-1:0]       dtc_fine;
  logic [16:0]             p_cur;
  logic                    locked, zph;
  logic [3:0]              rot_idx;
  logic [SD_W-1:0]         trk_frac;
  logic                    sd_clk;

  bank_fsm u_fsm (
    .clk(ckr), .rst_n, .search(cfg.search), .bank_en(cfg.bank_en),
    .pvt_mode(cfg.pvt_mode), .ab_mode(cfg.ab_mode), .bank_sel
  );

  tx_interface u_tx (
    .clk(ckr), .rst_n, .fcw(cfg.fcw), .tx_data, .mod_on(cfg.mod_on),
    .inv_kdcomod(cfg.inv_kdcomod), .fcw_mod, .mod_trk
  );

  kdtc_lms u_kdtc (
    .clk(ckr), .rst_n, .cal_en(cfg.dtc_cal && bank_sel == BANK_TRK),
    .init_val(cfg.inv_kdtc), .mu(cfg.dtc_mu), .bb, .p(p_cur), .inv_kdtc
  );

  phase_error_detector u_pd (
    .clk(ckr), .rst_n, .fcw(fcw_mod), .count, .bb, .inv_kdtc,
    .cf_ratio(cfg.cf_ratio), .kres(cfg.kres), .zph, .ext_en(cfg.spi_dtc),
    .ext_coarse(cfg.dtc_coarse), .ext_fine(cfg.dtc_fine),
    .phe, .fe, .dtc_coarse, .dtc_fine, .p_cur, .locked
  );

  loop_filter u_lf (
    .clk(ckr), .rst_n, .bank_sel, .phe,
    .mem_pvt(cfg.mem_pvt), .mem_acq(cfg.mem_acq), .mem_trk(cfg.mem_trk),
    .kdco_p(cfg.kdco_p), .alpha_p(cfg.alpha_p), .kdco_a(cfg.kdco_a),
    .alpha_a(cfg.alpha_a), .kdco_t(cfg.kdco_t), .alpha_t(cfg.alpha_t),
    .rho(cfg.rho), .iir_en(cfg.iir_en), .lambda(cfg.lambda), .mod_trk,
    .otw_pvt, .otw_acq, .otw_trk, .trk_frac, .zph
  );

  lfsr4_galois u_lfsr (.clk(ckr), .rst_n, .en(cfg.rotate_en), .state(rot_idx));

  dem_rotator #(.N(N_COARSE), .CW(COARSE_W), .IDXW(4)) u_dem_c (
    .code(dtc_coarse), .idx(rot_idx), .rot_en(cfg.rotate_en), .therm(dtc_coarse_th)
  );

  dem_rotator #(.N(N_FINE), .CW(FINE_W), .IDXW(4)) u_dem_f (
    .code(dtc_fine), .idx(rot_idx), .rot_en(cfg.rotate_en), .therm(dtc_fine_th)
  );

  assign sd_clk = cfg.sd_clk_sel ? count[3] : ckr;

  sigma_delta_mod #(.W(SD_W)) u_sd (
    .clk(sd_clk), .rst_n, .frac(trk_frac), .dither(trk_dither)
  );

  always_comb begin
    status.phe        = phe;
    status.otw_pvt    = otw_pvt;
    status.otw_acq    = otw_acq;
    status.otw_trk    = otw_trk;
    status.dtc_coarse = dtc_coarse;
    status.dtc_fine   = dtc_fine;
    status.inv_kdtc   = inv_kdtc;
    status.bank_sel   = bank_sel;
    status.locked     = locked;
  end
endmodule
