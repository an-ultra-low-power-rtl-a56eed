// Testbench for phase_error_detector. A reference model in the testbench
// keeps its own fractional accumulator, previous count and integer phase.
// The counter input is driven with the ideal count increment (FCW integer
// plus carry) and, at random, one edge too many or too few. Checked each
// cycle: fe, phe (integer phase * 2^16 +/- kres from the bang-bang bit), the
// DTC words against a real-valued evaluation of (1 - frac) * inv_kdtc, the
// SPI override of the DTC words, zero-phase restart and the lock flag.
module tb_phase_error_detector;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic [FCW_W-1:0] fcw = {7'd38, 16'd6};
  logic [CNT_W-1:0] count = 0;
  logic bb = 0, zph = 0, ext_en = 0;
  logic [KDTC_W-1:0] inv_kdtc = 16'hE2DC;
  logic [5:0] cf_ratio = 6'd29;
  logic [KRES_W-1:0] kres = 9'd159;
  logic [3:0] ext_coarse = 4'd5, ext_fine = 4'd9;
  logic signed [PHE_W-1:0] phe;
  logic signed [CNT_W-1:0] fe;
  logic [COARSE_W-1:0] dtc_coarse;
  logic [FINE_W-1:0] dtc_fine;
  logic [16:0] p_cur;
  logic locked;

  // model state
  int m_frac = 0, m_carry = 0, m_phe_int = 0, m_prev = 0, cnt_abs = 0;
  int e_fe, e_phe_int, e_fsum, e_p, err, n_ok, seen_lock = 0;
  real xr; int e_c, e_f;

  phase_error_detector dut (.clk, .rst_n, .fcw, .count, .bb, .inv_kdtc, .cf_ratio, .kres,
                            .zph, .ext_en, .ext_coarse, .ext_fine, .phe, .fe, .dtc_coarse,
                            .dtc_fine, .p_cur, .locked);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  task automatic step(input int extra);
    int inc;
    @(negedge clk);
    inc     = fcw[22:16] + m_carry + extra;
    cnt_abs = cnt_abs + inc;
    count   = CNT_W'(cnt_abs);
    bb      = 1'($urandom);
    e_fe    = fcw[22:16] + m_carry - inc;
    e_phe_int = zph ? 0 : m_phe_int + e_fe;
    e_fsum  = m_frac + fcw[15:0];
    e_p     = 65536 - (e_fsum % 65536);
    xr      = real'(e_p) / 65536.0 * real'(inv_kdtc) / 4096.0;
    e_c     = int'($floor(xr)) % 16;
    e_f     = int'((xr - $floor(xr)) * real'(cf_ratio) + 0.5);
    if (e_f > 31) e_f = 31;
    #1 check(fe == CNT_W'(e_fe), $sformatf("fe %0d exp %0d", fe, e_fe));
    @(posedge clk); #1;
    check(phe == PHE_W'(e_phe_int * 65536 + (bb ? int'(kres) : -int'(kres))),
          $sformatf("phe %0d exp int %0d", phe, e_phe_int));
    check(p_cur == 17'(e_p), "prediction");
    if (ext_en)
      check(dtc_coarse == ext_coarse && dtc_fine == 5'(ext_fine), "external DTC words");
    else
      check(dtc_coarse == 4'(e_c) && (int'(dtc_fine) - e_f) inside {-1, 0, 1},
            $sformatf("dtc %0d/%0d exp %0d/%0d", dtc_coarse, dtc_fine, e_c, e_f));
    m_frac    = e_fsum % 65536;
    m_carry   = e_fsum / 65536;
    m_phe_int = e_phe_int;
    if (locked) seen_lock++;
  endtask

  initial begin
    #2 rst_n = 0; #6 rst_n = 1;
    // prime the model: first sample after reset compares against count 0
    cnt_abs = 0;
    // default channel, ideal counts, a few slips
    for (int i = 0; i < 300; i++) step((i % 50 == 17) ? 1 : (i % 50 == 33) ? -1 : 0);
    // a larger fractional part exercises the carry and the full DTC range
    fcw = {7'd37, 16'd9830};
    for (int i = 0; i < 300; i++) step(($urandom_range(9) == 0) ? ($urandom_range(1) ? 1 : -1) : 0);
    // integer phase offset then zero-phase restart
    for (int i = 0; i < 5; i++) step(1);
    check(m_phe_int != 0, "phase offset built up");
    zph = 1; step(0); zph = 0;
    check(phe_int_is_zero(), "zero-phase restart cleared the integer phase");
    // lock: ideal counts for LOCK_CYCLES+2 cycles
    seen_lock = 0;
    for (int i = 0; i < 40; i++) step(0);
    check(locked, "lock after steady counts");
    step(1);
    check(!locked, "lock lost on a count slip");
    // SPI override of the DTC words
    ext_en = 1; for (int i = 0; i < 5; i++) step(0); ext_en = 0;
    // different gain and ratio
    inv_kdtc = 16'hC000; cf_ratio = 6'd20; kres = 9'd100;
    for (int i = 0; i < 100; i++) step(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit phe_int_is_zero();
    return m_phe_int == 0 && (phe == PHE_W'(bb ? int'(kres) : -int'(kres)));
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
