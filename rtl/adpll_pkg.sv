// adpll_pkg: widths, encodings and the configuration/status records shared by
// the ADPLL RTL.
//
// Number formats used throughout:
//   FCW        unsigned 7.16 (7 integer bits, 16 fractional bits), ratio of
//              the divided DCO clock CKVD2 to the reference clock.
//   PHE        signed 12.16 phase error in units of one CKVD2 period.
//   inv_kdtc   unsigned 4.12, coarse DTC steps per CKVD2 period.
//   tracking   9-bit tracking-bank word plus 5 fractional bits that the
//              sigma-delta modulator turns into a dither of one tracking LSB.
// The FCW split, the 5/6/9-bit bank widths, the 16+32 DTC cells, the 4-bit
// LFSR, the 5-bit sigma-delta and the 10-bit TX data follow the design
// description; the PHE, inv_kdtc and gain formats are this design's choice.
package adpll_pkg;
  timeunit 1ps; timeprecision 1fs;

  localparam int FCW_INT_W  = 7;
  localparam int FCW_FRAC_W = 16;
  localparam int FCW_W      = FCW_INT_W + FCW_FRAC_W;
  localparam int CNT_W      = 7;
  localparam int PHE_INT_W  = 12;
  localparam int PHE_FRAC_W = 16;
  localparam int PHE_W      = PHE_INT_W + PHE_FRAC_W;
  localparam int N_COARSE   = 16;
  localparam int N_FINE     = 32;
  localparam int COARSE_W   = 4;
  localparam int FINE_W     = 5;
  localparam int PVT_W      = 5;
  localparam int ACQ_W      = 6;
  localparam int TRK_W      = 9;
  localparam int SD_W       = 5;
  localparam int TXD_W      = 10;
  localparam int KDTC_W     = 16;
  localparam int KRES_W     = 9;

  // Which capacitor bank the loop currently steers (bank_sel).
  typedef enum logic [1:0] {
    BANK_OPEN = 2'd0,  // open loop: all banks take their words from SPI
    BANK_PVT  = 2'd1,
    BANK_ACQ  = 2'd2,
    BANK_TRK  = 2'd3
  } bank_sel_e;

  // Configuration held in the SPI register table.
  typedef struct packed {
    logic                  div_off;      // reg 0 bit 0 "onon"
    logic                  spi_dtc;      // reg 0 bit 1: DTC word from SPI
    logic [2:0]            dcopath;      // reg 0 bits 4:2 (brought out)
    logic [2:0]            bank_en;      // reg 0 bits 7:5 {TRK,ACQ,PVT}
    logic [KDTC_W-1:0]     inv_kdtc;     // regs 1-2
    logic [3:0]            dtc_coarse;   // reg 3 bits 3:0
    logic [3:0]            dtc_fine;     // reg 3 bits 7:4
    logic [FCW_W-1:0]      fcw;          // regs 4-6
    logic [5:0]            inv_kdcomod;  // reg 7 bits 5:0
    logic                  mod_on;       // reg 7 bit 6
    logic [PVT_W-1:0]      mem_pvt;      // reg 8
    logic [ACQ_W-1:0]      mem_acq;      // reg 9
    logic [TRK_W-1:0]      mem_trk;      // reg 10, reg 11 bit 0
    logic [1:0]            alpha_a;      // reg 11 bits 5:4
    logic [1:0]            alpha_p;      // reg 11 bits 7:6
    logic [4:0]            rho;          // reg 12 bits 4:0
    logic [2:0]            alpha_t;      // reg 12 bits 7:5
    logic [2:0]            pvt_mode;     // reg 13 bits 2:0
    logic                  buff_en;      // reg 13 bit 3 (brought out)
    logic                  iir_en;       // reg 13 bit 4
    logic [2:0]            lambda;       // reg 13 bits 7:5
    logic [2:0]            kdco_p;       // reg 14 bits 4:2
    logic [2:0]            ab_mode;      // reg 14 bits 7:5
    logic [3:0]            dtc_mu;       // reg 15 bits 3:0
    logic                  dtc_cal;      // reg 15 bit 4
    logic [2:0]            kdco_a;       // reg 15 bits 7:5
    logic [7:0]            kdco_t;       // reg 16
    logic [KRES_W-1:0]     kres;         // reg 17, reg 18 bit 0
    logic                  rotate_en;    // reg 18 bit 1
    logic                  sd_clk_sel;   // reg 18 bit 2: 1 = CKVD2/16 dither clock
    logic                  search;       // reg 18 bit 3: frequency search trigger
    logic [5:0]            cf_ratio;     // reg 19: coarse/fine DTC step ratio
  } adpll_cfg_t;

  // Internal signals that the SPI block can read back.
  typedef struct packed {
    logic [PHE_W-1:0]      phe;
    logic [PVT_W-1:0]      otw_pvt;
    logic [ACQ_W-1:0]      otw_acq;
    logic [TRK_W-1:0]      otw_trk;
    logic [COARSE_W-1:0]   dtc_coarse;
    logic [FINE_W-1:0]     dtc_fine;
    logic [KDTC_W-1:0]     inv_kdtc;
    logic [1:0]            bank_sel;
    logic                  locked;
  } adpll_status_t;

endpackage
