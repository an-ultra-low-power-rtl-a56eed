// Testbench for the spur-reduction effect of dynamic element matching in
// the closed loop. It builds the loop from adpll_core and the behavioural
// models, as tb_adpll_core does, but gives the DTC a deterministic cell
// mismatch of MISMATCH_PCT percent and runs a channel with FCW fraction 1/8
// (FCW = 38.125), so that without rotation the same DTC codes, and hence the
// same cell errors, repeat every 8 reference cycles.
// For each setting the tracking word (integer part plus dither bit) is
// recorded over N CKR cycles after settling, and the power at the spur
// frequencies fref/8, 2 fref/8 and 3 fref/8 is computed with a direct DFT.
// Checks: the loop locks in both settings, and rotation lowers the summed
// spur power by at least a factor of two (about 20 is observed).
// The rotation and its purpose follow the design description; the mismatch
// size, channel, record length and the pass criterion are this testbench's
// own choice.
module tb_adpll_dem;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam real MISMATCH = 10.0;
  localparam int  N = 2048;

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
  real rec [N];
  real spur_off, spur_on;

  dtc_coarse_fine #(.MISMATCH_PCT(MISMATCH)) u_dtc (.fref_in(fref), .coarse_th(dtc_coarse_th),
                                                    .fine_th(dtc_fine_th), .fref_dly);
  time_freezer u_tf (.fref_dly, .ckvd2, .ckvd2f, .ref_cmp, .ckr);
  dco u_dco (.otw_pvt, .otw_acq, .otw_trk, .trk_dither, .ckv);

  adpll_core dut (.rst_n, .spi_rst_n, .sclk, .cs_n, .mosi, .miso, .tx_data, .ckv, .ckvd2,
                  .ckvd2f, .ref_cmp, .ckr, .dtc_coarse_th, .dtc_fine_th, .otw_pvt, .otw_acq,
                  .otw_trk, .trk_dither, .locked, .bank_sel, .div_off, .buff_en, .dcopath);

  always #15625 fref = ~fref;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0.2f us: %s", $realtime / 1.0e6, msg); end
  endtask

  task automatic wr(input int a, input logic [7:0] d);
    logic [15:0] word;
    word = {1'b0, 7'(a), d};
    cs_n = 0; #50000;
    for (int i = 15; i >= 0; i--) begin
      mosi = word[i]; #50000;
      sclk = 1; #50000 sclk = 0;
    end
    #50000 cs_n = 1; #50000;
  endtask

  // summed power of the tones at k * fref/8, k = 1..3, of the recorded word
  function automatic real spur_power();
    real mean, re, im, pw;
    mean = 0.0;
    for (int i = 0; i < N; i++) mean += rec[i];
    mean /= N;
    pw = 0.0;
    for (int k = 1; k <= 3; k++) begin
      re = 0.0; im = 0.0;
      for (int i = 0; i < N; i++) begin
        re += (rec[i] - mean) * $cos(2.0 * 3.14159265358979 * k * i / 8.0);
        im += (rec[i] - mean) * $sin(2.0 * 3.14159265358979 * k * i / 8.0);
      end
      pw += (re * re + im * im) / (real'(N) * real'(N));
    end
    return pw;
  endfunction

  task automatic run(input bit rot, output real spur);
    real t0;
    wr(18, rot ? 8'h03 : 8'h01);                 // search off, rotation as given
    wr(18, rot ? 8'h0B : 8'h09);                 // search on
    t0 = $realtime;
    while (!locked && $realtime - t0 < 40.0e6) @(posedge ckr);
    check(locked, $sformatf("lock with rotation %0d", rot));
    #60000000;
    for (int i = 0; i < N; i++) begin
      @(posedge ckr);
      rec[i] = real'(otw_trk) + real'(trk_dither);
    end
    spur = spur_power();
    $display("rotation %0d: spur power at k*fref/8 = %0.5f LSB^2", rot, spur);
  endtask

  initial begin
    #1000 cs_n = 1;
    #1000 rst_n = 0; spi_rst_n = 0;
    #100000 spi_rst_n = 1; rst_n = 1;
    wr(18, 8'h03);
    wr(4, 8'h00); wr(5, 8'h20); wr(6, 8'h26);   // FCW = 38.125
    run(1'b0, spur_off);
    run(1'b1, spur_on);
    check(spur_on * 2.0 < spur_off,
          $sformatf("rotation lowers the fref/8 spurs (%0.5f vs %0.5f)", spur_on, spur_off));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
