// adpll_core: synthesizable part of the ADPLL chip.
//
// Holds everything that is digital logic: the SPI slave with the register
// table, the low-speed digital in the CKR domain, the 7-bit variable counter
// on CKVD2, the divide-by-two of the DCO output and the bang-bang flip-flop.
// The DTC delay line, the time freezer and the DCO are analog or custom
// circuits and connect through the ports: the core receives the DCO clock
// ckv, hands CKVD2 to the time freezer, takes back the frozen variable edge
// ckvd2f, the compensated delayed reference ref_cmp and the re-timed
// reference ckr, and drives the DTC thermometer words and the DCO bank words.
// rst_n resets the loop; spi_rst_n (separate pad) resets the registers.
module adpll_core
  import adpll_pkg::*;
(
  input  logic                    rst_n,
  input  logic                    spi_rst_n,
  input  logic                    sclk,
  input  logic                    cs_n,
  input  logic                    mosi,
  output logic                    miso,
  input  logic signed [TXD_W-1:0] tx_data,
  input  logic                    ckv,
  output logic                    ckvd2,
  input  logic                    ckvd2f,
  input  logic                    ref_cmp,
  input  logic                    ckr,
  output logic [N_COARSE-1:0]     dtc_coarse_th,
  output logic [N_FINE-1:0]       dtc_fine_th,
  output logic [PVT_W-1:0]        otw_pvt,
  output logic [ACQ_W-1:0]        otw_acq,
  output logic [TRK_W-1:0]        otw_trk,
  output logic                    trk_dither,
  output logic                    locked,
  output logic [1:0]              bank_sel,
  output logic                    div_off,
  output logic                    buff_en,
  output logic [2:0]              dcopath
);
  timeunit 1ps; timeprecision 1fs;

  adpll_cfg_t    cfg;
  adpll_status_t status;
  logic [CNT_W-1:0] count;
  logic          bb;

  spi_slave u_spi (.spi_rst_n, .sclk, .cs_n, .mosi, .miso, .status, .cfg);

  div2 u_div (.ckv, .rst_n, .ckvd2);

  ckv_counter #(.WIDTH(CNT_W)) u_cnt (.ckvd2, .rst_n, .count);

  bbpd u_bb (.ckvd2f, .ref_cmp, .rst_n, .bb);

  adpll_digital u_dig (
    .ckr, .rst_n, .cfg, .tx_data, .count, .bb,
    .dtc_coarse_th, .dtc_fine_th, .otw_pvt, .otw_acq, .otw_trk, .trk_dither, .status
  );

  assign locked   = status.locked;
  assign bank_sel = status.bank_sel;
  assign div_off  = cfg.div_off;
  assign buff_en  = cfg.buff_en;
  assign dcopath  = cfg.dcopath;
endmodule
