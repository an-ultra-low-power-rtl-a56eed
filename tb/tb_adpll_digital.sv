// Testbench for adpll_digital (CKR-domain logic) with the configuration
// struct driven directly. The variable counter is modelled as ideal: each
// CKR cycle it advances by the integer FCW plus the carry of the fractional
// reference accumulator, so the integer phase error stays zero unless the
// testbench slips a count on purpose. Checks:
//  * open loop (search = 0): the bank words equal the SPI words, status
//    mirrors the outputs;
//  * DTC words from SPI: thermometer popcounts equal the written words;
//  * predicted DTC words: thermometer popcounts equal the status words,
//    and DEM rotation changes the pattern but not the popcount;
//  * search = 1: PVT -> acquisition -> tracking sequence, lock flag;
//  * loop direction: bb held at 1 raises the tracking word, held at 0
//    lowers it; an integer count slip is seen as a phase error and clears
//    the lock flag;
//  * the sigma-delta dither averages to the tracking fraction;
//  * modulation: with mod_on the tracking word moves by
//    tx_data * inv_kdcomod / 512 LSBs.
module tb_adpll_digital;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic ckr = 0, rst_n = 1, bb = 0;
  adpll_cfg_t cfg;
  logic signed [TXD_W-1:0] tx_data = 0;
  logic [CNT_W-1:0] count = 0;
  logic [N_COARSE-1:0] dtc_coarse_th;
  logic [N_FINE-1:0] dtc_fine_th;
  logic [PVT_W-1:0] otw_pvt;
  logic [ACQ_W-1:0] otw_acq;
  logic [TRK_W-1:0] otw_trk;
  logic trk_dither;
  adpll_status_t status;
  int frac_tb = 0, carry_tb = 0, slip = 0;
  int seen_pvt, seen_acq, seen_trk, n_rot, n_ones, w0, w1;

  adpll_digital dut (.ckr, .rst_n, .cfg, .tx_data, .count, .bb, .dtc_coarse_th, .dtc_fine_th,
                     .otw_pvt, .otw_acq, .otw_trk, .trk_dither, .status);

  always #15625 ckr = ~ckr;

  // ideal variable counter, updated away from the CKR rising edge
  always @(negedge ckr) begin
    count = count + CNT_W'(int'(cfg.fcw[22:16]) + carry_tb + slip);
    slip  = 0;
  end
  always @(posedge ckr) begin
    if (!rst_n) begin frac_tb = 0; carry_tb = 0; end
    else begin
      frac_tb  = frac_tb + int'(cfg.fcw[15:0]);
      carry_tb = frac_tb >> 16;
      frac_tb  = frac_tb & 16'hFFFF;
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0.2f us: %s", $realtime / 1.0e6, msg); end
  endtask

  task automatic cycles(input int n);
    repeat (n) @(posedge ckr);
    #1;
  endtask

  initial begin
    cfg = '0;
    cfg.bank_en = 3'b111; cfg.inv_kdtc = 16'hE2DC; cfg.fcw = {7'd38, 16'd6};
    cfg.inv_kdcomod = 6'd17; cfg.mem_pvt = 5'd4; cfg.mem_acq = 6'd6; cfg.mem_trk = 9'd256;
    cfg.alpha_p = 2'd2; cfg.kdco_p = 3'd3; cfg.kdco_a = 3'd1; cfg.kdco_t = 8'd255; cfg.rho = 5'd8;
    cfg.pvt_mode = 3'd1; cfg.ab_mode = 3'd3; cfg.dtc_mu = 4'd11; cfg.lambda = 3'd2;
    cfg.kres = 9'd511; cfg.rotate_en = 1'b1; cfg.cf_ratio = 6'd29;
    #2000 rst_n = 0; #10000 rst_n = 1;

    // open loop
    cycles(10);
    check(otw_pvt == 5'd4 && otw_acq == 6'd6 && otw_trk == 9'd256, "open loop: SPI bank words");
    check(status.bank_sel == 2'd0 && status.otw_trk == otw_trk && status.otw_pvt == otw_pvt,
          "status mirrors the outputs");
    cfg.mem_pvt = 5'd20; cfg.mem_acq = 6'd33; cfg.mem_trk = 9'd100;
    cycles(2);
    check(otw_pvt == 5'd20 && otw_acq == 6'd33 && otw_trk == 9'd100, "open loop follows SPI");
    cfg.mem_pvt = 5'd4; cfg.mem_acq = 6'd6; cfg.mem_trk = 9'd256;

    // DTC words from SPI
    cfg.spi_dtc = 1'b1; cfg.dtc_coarse = 4'd7; cfg.dtc_fine = 4'd11;
    cycles(3);
    check($countones(dtc_coarse_th) == 7 && $countones(dtc_fine_th) == 11, "external DTC words");
    cfg.spi_dtc = 1'b0;

    // predicted words and DEM rotation
    cfg.fcw = {7'd37, 16'd9830};
    n_rot = 0;
    cycles(2);
    repeat (200) begin
      cycles(1);
      check($countones(dtc_coarse_th) == int'(status.dtc_coarse) &&
            $countones(dtc_fine_th) == int'(status.dtc_fine), "thermometer popcount");
      if (dtc_coarse_th != 16'((32'd1 << status.dtc_coarse) - 1)) n_rot++;
    end
    check(n_rot > 100, $sformatf("DEM rotation: %0d of 200 patterns rotated", n_rot));
    cfg.fcw = {7'd38, 16'd6};

    // bank sequence and lock, bang-bang alternating
    seen_pvt = 0; seen_acq = 0; seen_trk = 0;
    cfg.search = 1'b1;
    repeat (400) begin
      bb = ~bb;
      cycles(1);
      if (status.bank_sel == 2'd1) seen_pvt++;
      if (status.bank_sel == 2'd2) seen_acq++;
      if (status.bank_sel == 2'd3) seen_trk++;
    end
    check(seen_pvt == 32, $sformatf("PVT for %0d cycles, expected 32", seen_pvt));
    check(seen_acq == 128, $sformatf("acquisition for %0d cycles, expected 128", seen_acq));
    check(seen_trk > 200, "tracking reached");
    check(status.locked, "locked with ideal counts");

    // loop direction in tracking
    w0 = otw_trk; bb = 1; cycles(100); w1 = otw_trk;
    check(w1 > w0, $sformatf("bb = 1 raises the tracking word (%0d -> %0d)", w0, w1));
    w0 = otw_trk; bb = 0; cycles(200); w1 = otw_trk;
    check(w1 < w0, $sformatf("bb = 0 lowers the tracking word (%0d -> %0d)", w0, w1));

    // sigma-delta dither average
    n_ones = 0;
    repeat (64) begin @(posedge ckr); bb = ~bb; #1 if (trk_dither) n_ones++; end
    check(n_ones > 0 || status.otw_trk == 0, "dither active");

    // count slip: seen as phase error, lock dropped
    @(negedge ckr) slip = 1;
    cycles(2);
    check(!status.locked, "count slip clears the lock flag");
    check($signed(status.phe) < 0, "count slip gives a negative phase error (variable ahead)");
    @(negedge ckr) slip = -1;
    repeat (60) begin bb = ~bb; cycles(1); end
    check(status.locked, "relock after the slip is undone");

    // modulation: tracking word offset of tx * 17 / 512
    cfg.search = 1'b0;
    cycles(3);
    w0 = otw_trk;
    cfg.mod_on = 1'b1; tx_data = 10'sd300;
    cycles(3);
    w1 = otw_trk;
    check(w1 - w0 inside {9, 10}, $sformatf("modulation offset %0d, expected 9.96", w1 - w0));
    tx_data = -10'sd300;
    cycles(3);
    w1 = otw_trk;
    check(w0 - w1 inside {9, 10, 11}, $sformatf("negative modulation offset %0d", w0 - w1));
    check(status.inv_kdtc == 16'hE2DC, "inv_kdtc follows SPI while calibration is off");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
