// adpll_top: the complete ADPLL, digital core closed through behavioural
// models of the analog parts.
//
// Counter-based ADPLL with a DTC phase predictor and a bang-bang phase
// detector. The reference clock fref (16 or 32 MHz) is delayed by the
// coarse-fine DTC by the predicted fractional phase, so that, in lock, its
// edge lines up with an edge of CKVD2 = DCO/2. The time freezer passes one
// CKVD2 edge to the bang-bang flip-flop and produces CKR, the reference
// re-timed to CKVD2, which clocks all low-speed logic. The variable counter
// gives the integer phase; the phase error drives the PVT, acquisition and
// tracking banks of the DCO in turn. Output frequency: f_dco = 2 * FCW * fref.
// The reference input buffer is taken as a wire and the supply-noise replica
// line is not modelled. Only adpll_core is synthesizable; dtc_coarse_fine,
// time_freezer and dco are behavioural models, so this module is for
// simulation of the closed loop. Ports: reference, resets, SPI, TX data,
// the DCO clock, the re-timed reference, lock and bank state, and the
// analog control bits of the register table.
module adpll_top
  import adpll_pkg::*;
(
  input  logic                    fref,
  input  logic                    rst_n,
  input  logic                    spi_rst_n,
  input  logic                    sclk,
  input  logic                    cs_n,
  input  logic                    mosi,
  output logic                    miso,
  input  logic signed [TXD_W-1:0] tx_data,
  output logic                    ckv,
  output logic                    ckr,
  output logic                    locked,
  output logic [1:0]              bank_sel,
  output logic                    div_off,
  output logic                    buff_en,
  output logic [2:0]              dcopath
);
  timeunit 1ps; timeprecision 1fs;

  logic                ckvd2, ckvd2f, ref_cmp, fref_dly, trk_dither;
  logic [N_COARSE-1:0] dtc_coarse_th;
  logic [N_FINE-1:0]   dtc_fine_th;
  logic [PVT_W-1:0]    otw_pvt;
  logic [ACQ_W-1:0]    otw_acq;
  logic [TRK_W-1:0]    otw_trk;

  dtc_coarse_fine u_dtc (
    .fref_in(fref), .coarse_th(dtc_coarse_th), .fine_th(dtc_fine_th), .fref_dly
  );

  time_freezer u_tf (.fref_dly, .ckvd2, .ckvd2f, .ref_cmp, .ckr);

  dco u_dco (.otw_pvt, .otw_acq, .otw_trk, .trk_dither, .ckv);

  adpll_core u_core (
    .rst_n, .spi_rst_n, .sclk, .cs_n, .mosi, .miso, .tx_data,
    .ckv, .ckvd2, .ckvd2f, .ref_cmp, .ckr,
    .dtc_coarse_th, .dtc_fine_th, .otw_pvt, .otw_acq, .otw_trk, .trk_dither,
    .locked, .bank_sel, .div_off, .buff_en, .dcopath
  );
endmodule
