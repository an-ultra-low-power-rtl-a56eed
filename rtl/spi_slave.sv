// spi_slave: SPI slave with the ADPLL configuration registers.
//
// SPI mode 0 (MOSI sampled on SCLK rising edges, MISO driven on falling
// edges), chip select cs_n active low, MSB first, 16-bit frames:
//     bit 15     1 = read, 0 = write
//     bits 14:8  register address
//     bits 7:0   write data (ignored on a read)
// A write takes effect on the 16th rising edge. On a read, MISO carries the
// addressed byte during the last 8 clocks of the frame. The block runs on the
// external SCLK only; spi_rst_n (its own pad) restores the defaults.
// Addresses 0-19 hold the configuration (decoded into 'cfg', see adpll_pkg
// for the bit positions); 20-31 read as zero. Addresses 32-44 read back
// internal signals for test: 32-35 phase error (LSB first), 36 PVT word,
// 37 acquisition word, 38-39 tracking word, 40 coarse DTC word, 41 fine DTC
// word, 42-43 inv_kdtc, 44 {locked, bank_sel}. The status inputs come from
// the CKR domain and are sampled without synchronisation; they are meant to
// be read while the loop is held or settled.
// The register names, bit positions and several defaults follow the
// register table of the design description; the frame format, the
// read-back map, registers 18 bits 2-3 and 19, and the defaults of the
// loop-gain fields (rho, alpha_t, kdco_p/a/t, ab_mode, kres), inv_kdtc and
// mem_trk are this design's choice: the gain encodings are this design's
// own, so the table's gain values are replaced by ones that lock it.
module spi_slave
  import adpll_pkg::*;
(
  input  logic          spi_rst_n,
  input  logic          sclk,
  input  logic          cs_n,
  input  logic          mosi,
  output logic          miso,
  input  adpll_status_t status,
  output adpll_cfg_t    cfg
);
  timeunit 1ps; timeprecision 1fs;

  localparam int NREG = 20;
  localparam logic [7:0] DEFAULTS [NREG] = '{
    8'hE1, 8'hDC, 8'hE2, 8'h00, 8'h06, 8'h00, 8'h26, 8'h11, 8'h04, 8'h06,
    8'h00, 8'h81, 8'h08, 8'h49, 8'h6C, 8'h2B, 8'hFF, 8'hFF, 8'h0B, 8'h1D
  };

  logic [7:0]  regs [NREG];
  logic [4:0]  bitcnt;
  logic [14:0] shift;
  logic [15:0] frame;
  logic [7:0]  tx, rdata;
  logic [6:0]  raddr;
  logic        frame_clr;

  assign frame = {shift, mosi};
  // frame state is cleared while cs_n is high and by the SPI reset
  assign frame_clr = cs_n | ~spi_rst_n;

  // receive side
  always_ff @(posedge sclk or posedge frame_clr) begin
    if (frame_clr) begin
      bitcnt <= '0;
      shift  <= '0;
    end else begin
      shift  <= frame[14:0];
      if (bitcnt != 5'd16) bitcnt <= bitcnt + 1'b1;
    end
  end

  always_ff @(posedge sclk or negedge spi_rst_n) begin
    if (!spi_rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= DEFAULTS[i];
    end else if (!cs_n && bitcnt == 5'd15 && !frame[15] && int'(frame[14:8]) < NREG) begin
      regs[frame[12:8]] <= frame[7:0];
    end
  end

  // read data
  assign raddr = shift[6:0];
  always_comb begin
    rdata = 8'h00;
    if (int'(raddr) < NREG) rdata = regs[raddr[4:0]];
    else unique case (raddr)
      7'd32: rdata = status.phe[7:0];
      7'd33: rdata = status.phe[15:8];
      7'd34: rdata = status.phe[23:16];
      7'd35: rdata = 8'(status.phe[PHE_W-1:24]);
      7'd36: rdata = 8'(status.otw_pvt);
      7'd37: rdata = 8'(status.otw_acq);
      7'd38: rdata = status.otw_trk[7:0];
      7'd39: rdata = 8'(status.otw_trk[TRK_W-1:8]);
      7'd40: rdata = 8'(status.dtc_coarse);
      7'd41: rdata = 8'(status.dtc_fine);
      7'd42: rdata = status.inv_kdtc[7:0];
      7'd43: rdata = status.inv_kdtc[15:8];
      7'd44: rdata = {5'b0, status.locked, status.bank_sel};
      default: rdata = 8'h00;
    endcase
  end

  // transmit side: load after the 8th rising edge, then shift on falling edges
  always_ff @(negedge sclk or posedge frame_clr) begin
    if (frame_clr)            tx <= '0;
    else if (bitcnt == 5'd8)  tx <= shift[7] ? rdata : 8'h00;
    else                      tx <= {tx[6:0], 1'b0};
  end
  assign miso = tx[7];

  // register fields
  always_comb begin
    cfg.div_off     = regs[0][0];
    cfg.spi_dtc     = regs[0][1];
    cfg.dcopath     = regs[0][4:2];
    cfg.bank_en     = regs[0][7:5];
    cfg.inv_kdtc    = {regs[2], regs[1]};
    cfg.dtc_coarse  = regs[3][3:0];
    cfg.dtc_fine    = regs[3][7:4];
    cfg.fcw         = {regs[6][6:0], regs[5], regs[4]};
    cfg.inv_kdcomod = regs[7][5:0];
    cfg.mod_on      = regs[7][6];
    cfg.mem_pvt     = regs[8][4:0];
    cfg.mem_acq     = regs[9][5:0];
    cfg.mem_trk     = {regs[11][0], regs[10]};
    cfg.alpha_a     = regs[11][5:4];
    cfg.alpha_p     = regs[11][7:6];
    cfg.rho         = regs[12][4:0];
    cfg.alpha_t     = regs[12][7:5];
    cfg.pvt_mode    = regs[13][2:0];
    cfg.buff_en     = regs[13][3];
    cfg.iir_en      = regs[13][4];
    cfg.lambda      = regs[13][7:5];
    cfg.kdco_p      = regs[14][4:2];
    cfg.ab_mode     = regs[14][7:5];
    cfg.dtc_mu      = regs[15][3:0];
    cfg.dtc_cal     = regs[15][4];
    cfg.kdco_a      = regs[15][7:5];
    cfg.kdco_t      = regs[16];
    cfg.kres        = {regs[18][0], regs[17]};
    cfg.rotate_en   = regs[18][1];
    cfg.sd_clk_sel  = regs[18][2];
    cfg.search      = regs[18][3];
    cfg.cf_ratio    = regs[19][5:0];
  end
endmodule
