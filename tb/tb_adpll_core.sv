// Testbench for adpll_core, the synthesizable part of the chip. The
// testbench closes the loop around it with the behavioural DTC, time
// freezer and DCO models and talks to it only through its ports (SPI,
// reset, tx_data, clocks, bank words). Checks:
//  * CKVD2 toggles at half the CKV rate;
//  * with the register defaults the bank_sel port steps PVT -> acquisition
//    -> tracking and the locked port rises;
//  * the bank words read back over SPI equal the bank-word ports;
//  * the CKV frequency after settling is 2 * FCW * 32 MHz within 20 kHz;
//  * the DCO control pins div_off, buff_en and dcopath follow register 0
//    and 13, and search = 0 returns the bank words to their SPI values.
module tb_adpll_core;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic fref = 0, rst_n = 1, spi_rst_n = 1, sclk = 0, cs_n = 0, mosi = 0, miso;
  logic signed [TXD_W-1:0] tx_data = 0;
  logic ckv, ckvd2, ckvd2f, ref_cmp, ckr, fref_dly, trk_dither, locked, div_off, buff_en;
  logic [N_COARSE-1:0] dtc_coarse_th;
  logic [N_FINE-1:0] dtc_fine_th;
  logic [PVT_W-1:0] otw_pvt;
  logic [ACQ_W-1:0] otw_acq;
  logic [TRK_W-1:0] otw_trk;
  logic [1:0] bank_sel;
  logic [2:0] dcopath;
  logic [7:0] rd, rd2;
  int n_ckv = 0, n_ckvd2 = 0, seen [4];
  int ckv_n = 0;
  real ckv_t = 0.0, f_meas, f_exp, t0;
  int n0;

  dtc_coarse_fine u_dtc (.fref_in(fref), .coarse_th(dtc_coarse_th), .fine_th(dtc_fine_th), .fref_dly);
  time_freezer u_tf (.fref_dly, .ckvd2, .ckvd2f, .ref_cmp, .ckr);
  dco u_dco (.otw_pvt, .otw_acq, .otw_trk, .trk_dither, .ckv);

  adpll_core dut (.rst_n, .spi_rst_n, .sclk, .cs_n, .mosi, .miso, .tx_data, .ckv, .ckvd2,
                  .ckvd2f, .ref_cmp, .ckr, .dtc_coarse_th, .dtc_fine_th, .otw_pvt, .otw_acq,
                  .otw_trk, .trk_dither, .locked, .bank_sel, .div_off, .buff_en, .dcopath);

  always #15625 fref = ~fref;
  always @(posedge ckv) begin n_ckv++; ckv_n++; ckv_t = $realtime; end
  always @(posedge ckvd2) n_ckvd2++;
  always @(posedge ckr) seen[bank_sel]++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0.2f us: %s", $realtime / 1.0e6, msg); end
  endtask

  task automatic xfer(input logic [15:0] word, output logic [7:0] rx);
    rx = '0;
    cs_n = 0; #50000;
    for (int i = 15; i >= 0; i--) begin
      mosi = word[i]; #50000;
      sclk = 1;
      if (i < 8) rx = {rx[6:0], miso};
      #50000 sclk = 0;
    end
    #50000 cs_n = 1; #50000;
  endtask

  task automatic wr(input int a, input logic [7:0] d);
    logic [7:0] dummy;
    xfer({1'b0, 7'(a), d}, dummy);
  endtask

  task automatic rdreg(input int a, output logic [7:0] d);
    xfer({1'b1, 7'(a), 8'h00}, d);
  endtask

  initial begin
    #1000 cs_n = 1;
    #1000 rst_n = 0; spi_rst_n = 0;
    #100000 spi_rst_n = 1; rst_n = 1;
    n_ckv = 0; n_ckvd2 = 0;
    #1000000;
    check(n_ckv - 2 * n_ckvd2 inside {-2, -1, 0, 1, 2}, "CKVD2 at half the CKV rate");
    t0 = $realtime;
    while (!locked && $realtime - t0 < 40.0e6) @(posedge ckr);
    check(locked, "locked port");
    check(seen[1] > 0 && seen[2] > 0 && seen[3] > 0, "bank sequence PVT -> ACQ -> TRK");
    #60000000;
    @(posedge fref); n0 = ckv_n; t0 = ckv_t;
    repeat (1024) @(posedge fref);
    f_meas = real'(ckv_n - n0) / ((ckv_t - t0) * 1.0e-12);
    f_exp  = 2.0 * 32.0e6 * (38.0 + 6.0 / 65536.0);
    check(f_meas > f_exp - 20.0e3 && f_meas < f_exp + 20.0e3,
          $sformatf("frequency %0.6f MHz, expected %0.6f MHz", f_meas / 1.0e6, f_exp / 1.0e6));
    // hold the loop (open loop keeps the words static) and read them back
    wr(18, 8'h03);
    #1000000;
    rdreg(36, rd); check(rd == 8'(otw_pvt), "SPI read-back of the PVT word");
    rdreg(37, rd); check(rd == 8'(otw_acq), "SPI read-back of the acquisition word");
    rdreg(38, rd); rdreg(39, rd2);
    check({rd2[0], rd} == otw_trk, "SPI read-back of the tracking word");
    check(otw_pvt == 5'd4 && otw_acq == 6'd6 && otw_trk == 9'd256, "open loop: SPI bank words");
    // control pins
    check(div_off == 1'b1 && dcopath == 3'd0, "register 0 default pins");
    wr(0, 8'hFC);
    check(div_off == 1'b0 && dcopath == 3'd7, "register 0 written pins");
    wr(13, 8'h41);
    check(buff_en == 1'b0, "buffer enable pin");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
