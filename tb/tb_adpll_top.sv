// End-to-end testbench for adpll_top with all parameters at their defaults.
// A 32 MHz reference drives the chip; the DTC, time freezer and DCO are the
// behavioural models inside adpll_top. The SPI pins are driven by a mode-0
// master task at 10 MHz.
// Sequence and checks:
//  1. reset with the register defaults (channel FCW 38 + 6/65536): the bank
//     sequencer must pass PVT -> acquisition -> tracking and the loop must
//     declare lock within 30 us; the average DCO frequency, measured from
//     CKV edge time stamps over 32 us, must be 2 * FCW * 32 MHz within 20 kHz;
//     lock and bank state are read back over SPI;
//  2. IIR filter on the proportional path enabled: loop stays locked;
//  3. two-point modulation with tx_data = +/-256 (250 kHz deviation): the
//     measured frequency shift, 40 us after each data step, must be within
//     10 % of +/-250 kHz;
//  4. channel change to FCW 37.15 and a new search: relock and frequency;
//  5. DTC gain calibration on that channel (whose fraction sweeps the whole
//     DTC range quickly): inv_kdtc is written 15 % low, the LMS loop is
//     enabled with a large step and must bring it back within 3 % of the
//     true value Tv / T_coarse * 4096, with the loop still locked;
//  6. open loop (search = 0): the DCO settles at the SPI bank words;
//  7. DTC words from SPI: the thermometer codes show the written values.
// Each mechanism is counted while the test runs (bank visits, zero-phase
// restarts, lock, DEM rotation, sigma-delta dither, LMS updates, IIR,
// modulation path, SPI read-back, open loop, external DTC, acquisition
// bank movement); a mechanism that never occurs is a failure.
// The channel, the 250 kHz BLE deviation and the block behaviour checked
// follow the design description; the tolerances, waits and the 37.15
// calibration channel are this testbench's own choice.
module tb_adpll_top;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam real TREF = 31250.0;

  int checks = 0, failures = 0;
  logic fref = 0, rst_n = 1, spi_rst_n = 1, sclk = 0, cs_n = 0, mosi = 0;
  logic miso, ckv, ckr, locked, div_off, buff_en;
  logic [1:0] bank_sel;
  logic [2:0] dcopath;
  logic signed [TXD_W-1:0] tx_data = 0;
  logic [7:0] rd;
  real f_meas, f_ref0, t_lock;

  // mechanism counters
  int n_pvt, n_acq, n_trk, n_zph, n_lock, n_rot, n_dither, n_lms, n_iir, n_mod;
  int n_spi, n_open, n_extdtc, n_acq_move;
  logic [15:0] last_th;
  logic [3:0]  last_code;
  logic [5:0]  last_acq;
  logic        last_lock, last_dither;
  logic [15:0] last_kdtc;

  adpll_top dut (.fref, .rst_n, .spi_rst_n, .sclk, .cs_n, .mosi, .miso, .tx_data,
                 .ckv, .ckr, .locked, .bank_sel, .div_off, .buff_en, .dcopath);

  always #(TREF / 2.0) fref = ~fref;

  always @(posedge ckr) begin
    case (bank_sel)
      2'd1: n_pvt++;
      2'd2: n_acq++;
      2'd3: n_trk++;
      default: n_open++;
    endcase
    if (dut.u_core.u_dig.zph) n_zph++;
    if (locked && !last_lock) n_lock++;
    last_lock = locked;
    if (dut.u_core.u_dig.dtc_coarse == last_code && dut.u_core.dtc_coarse_th != last_th) n_rot++;
    last_code = dut.u_core.u_dig.dtc_coarse;
    last_th   = dut.u_core.dtc_coarse_th;
    if (bank_sel == 2'd2 && dut.u_core.otw_acq != last_acq) n_acq_move++;
    last_acq = dut.u_core.otw_acq;
    if (dut.u_core.u_dig.cfg.dtc_cal && dut.u_core.u_dig.inv_kdtc != last_kdtc) n_lms++;
    last_kdtc = dut.u_core.u_dig.inv_kdtc;
    if (dut.u_core.u_dig.cfg.iir_en && bank_sel == 2'd3 &&
        dut.u_core.u_dig.u_lf.phe_iir != dut.u_core.u_dig.u_lf.phe_eff) n_iir++;
    if (dut.u_core.u_dig.mod_trk != 0) n_mod++;
    if (dut.u_core.u_dig.cfg.spi_dtc && dut.u_core.dtc_coarse_th != 0) n_extdtc++;
  end
  always @(dut.u_core.trk_dither) n_dither++;

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
    n_spi++;
  endtask

  // average CKV frequency over n reference periods, from edge time stamps
  int  ckv_n = 0;
  real ckv_t = 0.0;
  always @(posedge ckv) begin ckv_n++; ckv_t = $realtime; end

  task automatic measure(input int nref, output real f);
    real t0;
    int n0;
    @(posedge fref); n0 = ckv_n; t0 = ckv_t;
    repeat (nref) @(posedge fref);
    f = real'(ckv_n - n0) / ((ckv_t - t0) * 1.0e-12);
  endtask

  task automatic wait_lock(input real max_us, output real t);
    real t0;
    t0 = $realtime;
    while (!locked && ($realtime - t0) < max_us * 1.0e6) @(posedge fref);
    t = ($realtime - t0) / 1.0e6;
  endtask

  initial begin
    real f_exp, f_hi, f_lo, kd_true;
    #1000 cs_n = 1;
    #1000 rst_n = 0; spi_rst_n = 0;
    #100000 spi_rst_n = 1; rst_n = 1;

    // 1. lock at the default channel
    wait_lock(30.0, t_lock);
    check(locked, $sformatf("lock within 30 us (took %0.2f us)", t_lock));
    $display("locked after %0.2f us", t_lock);
    check(n_pvt > 0 && n_acq > 0 && n_trk > 0, "bank sequence PVT -> ACQ -> TRK");
    #60000000;
    f_exp = 2.0 * 32.0e6 * (38.0 + 6.0 / 65536.0);
    measure(1024, f_ref0);
    $display("f_dco %0.6f MHz, expected %0.6f MHz", f_ref0 / 1.0e6, f_exp / 1.0e6);
    check(f_ref0 > f_exp - 20.0e3 && f_ref0 < f_exp + 20.0e3, "locked frequency");
    rdreg(44, rd);
    check(rd[2] == 1'b1 && rd[1:0] == 2'd3, $sformatf("SPI status lock/bank = %h", rd));
    rdreg(36, rd);
    check(rd == 8'(dut.u_core.otw_pvt), "SPI read-back of the PVT word");

    // 2. IIR filter
    wr(13, 8'h59);
    #5000000;
    check(locked, "locked with the IIR filter");
    wr(13, 8'h49);
    #5000000;

    // 3. two-point modulation
    wr(7, 8'h51);
    tx_data = 10'sd256;
    #40000000;
    measure(512, f_hi);
    tx_data = -10'sd256;
    #40000000;
    measure(512, f_lo);
    $display("modulation: +%0.1f kHz / %0.1f kHz", (f_hi - f_exp) / 1.0e3, (f_lo - f_exp) / 1.0e3);
    check(f_hi - f_exp > 225.0e3 && f_hi - f_exp < 275.0e3, "positive deviation");
    check(f_exp - f_lo > 225.0e3 && f_exp - f_lo < 275.0e3, "negative deviation");
    tx_data = 0;
    wr(7, 8'h11);

    // 4. channel change and new search
    wr(4, 8'h66); wr(5, 8'h26); wr(6, 8'h25);     // FCW = 37 + 0x2666/65536
    wr(18, 8'h03); wr(18, 8'h0B);
    wait_lock(40.0, t_lock);
    check(locked, $sformatf("relock after channel change (%0.2f us)", t_lock));
    #60000000;
    f_exp = 2.0 * 32.0e6 * (37.0 + real'(16'h2666) / 65536.0);
    measure(1024, f_meas);
    $display("new channel f_dco %0.6f MHz, expected %0.6f MHz", f_meas / 1.0e6, f_exp / 1.0e6);
    check(f_meas > f_exp - 20.0e3 && f_meas < f_exp + 20.0e3, "frequency on the new channel");

    // 5. DTC gain calibration from a wrong start value
    kd_true = 2.0e6 / (2.0 * 32.0 * (37.0 + real'(16'h2666) / 65536.0)) / 58.0 * 4096.0;
    wr(2, 8'hC0); wr(1, 8'h00);
    wr(15, 8'h36);                 // dtc_cal = 1, mu = 6
    #12000000;
    $display("inv_kdtc after calibration %0d, ideal %0.0f", dut.u_core.u_dig.inv_kdtc, kd_true);
    check(real'(dut.u_core.u_dig.inv_kdtc) > kd_true * 0.97 &&
          real'(dut.u_core.u_dig.inv_kdtc) < kd_true * 1.03, "LMS calibration converged");
    wr(15, 8'h3B);                 // mu = 11, keep calibrating
    #2000000;
    check(locked, "locked with calibration running");

    // 6. open loop
    wr(18, 8'h03);
    #2000000;
    check(bank_sel == 2'd0, "open loop selected");
    measure(64, f_meas);
    f_exp = 2.15e9 + 4.0 * 21.83e6 + 6.0 * 2.467e6 + 256.0 * 30.56e3;
    check(f_meas > f_exp - 50.0e3 && f_meas < f_exp + 50.0e3,
          $sformatf("open-loop frequency %0.3f MHz, expected %0.3f MHz", f_meas / 1.0e6, f_exp / 1.0e6));

    // 7. DTC words from SPI, and the divider-off control pin
    wr(3, 8'h95); wr(0, 8'hE3);
    repeat (4) @(posedge ckr);
    check($countones(dut.u_core.dtc_coarse_th) == 5 && $countones(dut.u_core.dtc_fine_th) == 9,
          "DTC thermometer codes from SPI");
    check(div_off == 1'b1, "divider-off pin");

    $display("mechanisms: pvt=%0d acq=%0d trk=%0d zph=%0d lock=%0d rot=%0d dither=%0d lms=%0d iir=%0d mod=%0d spi=%0d open=%0d extdtc=%0d acq_move=%0d",
             n_pvt, n_acq, n_trk, n_zph, n_lock, n_rot, n_dither, n_lms, n_iir, n_mod,
             n_spi, n_open, n_extdtc, n_acq_move);
    check(n_pvt > 0, "PVT bank used");
    check(n_acq > 0, "acquisition bank used");
    check(n_trk > 0, "tracking bank used");
    check(n_zph >= 6, "zero-phase restarts");
    check(n_lock >= 2, "lock detected");
    check(n_rot > 0, "DEM rotation");
    check(n_dither > 0, "sigma-delta dither");
    check(n_lms > 0, "LMS updates");
    check(n_iir > 0, "IIR filtering");
    check(n_mod > 0, "DCO modulation path");
    check(n_spi > 0, "SPI read-back");
    check(n_open > 0, "open loop");
    check(n_extdtc > 0, "external DTC words");
    check(n_acq_move > 0, "acquisition bank moved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
