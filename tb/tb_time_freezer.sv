// Testbench for the behavioural time freezer. A 1.216 GHz CKVD2 and a
// 32 MHz delayed reference with random phase drive the model. For every
// reference edge checks: the frozen CKVD2F pulse starts T_GATE after the
// reference edge if CKVD2 is already high, else T_GATE after the next CKVD2
// rising edge; exactly one pulse per reference period; REF_CMP follows the
// reference by T_GATE + T_OFS; CKR rises T_GATE after the second CKVD2
// rising edge after the CKVD2 rising edge that was frozen and is low again before the next one.
module tb_time_freezer;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic fref_dly = 0, ckvd2 = 0, ckvd2f, ref_cmp, ckr;
  real t_ref, t_base, t_rise [$], t_exp, t_f, t_k, t_c;
  int npulse = 0, n_high = 0, n_low = 0;
  real TV = 822.37;

  time_freezer dut (.fref_dly, .ckvd2, .ckvd2f, .ref_cmp, .ckr);

  always #(TV / 2.0) ckvd2 = ~ckvd2;
  always @(posedge ckvd2) begin t_rise.push_back($realtime); if (t_rise.size() > 8) void'(t_rise.pop_front()); end
  always @(posedge ckvd2f) npulse++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    real ph;
    logic lvl;
    #5000;
    repeat (300) begin
      ph = real'($urandom_range(100000)) / 100.0;
      #(ph);
      npulse = 0;
      fref_dly = 1; t_ref = $realtime;
      lvl = ckvd2;
      if (ckvd2) n_high++; else n_low++;
      t_base = t_rise[$];
      fork
        begin @(posedge ref_cmp); t_c = $realtime; end
        begin @(posedge ckvd2f); t_f = $realtime; end
      join
      check(t_c - t_ref > 32.99 && t_c - t_ref < 33.01, "ref_cmp delay");
      t_exp = lvl ? t_ref + 30.0 : t_base + TV + 30.0;
      check(t_f > t_exp - 0.01 && t_f < t_exp + 0.01,
            $sformatf("frozen edge at %0.2f, expected %0.2f", t_f - t_ref, t_exp - t_ref));
      // CKVD2 rising edge that was frozen: the last one if CKVD2 was high
      t_exp = lvl ? t_base : t_base + TV;
      @(posedge ckr); t_k = $realtime;
      check(t_k > t_exp + 2.0 * TV + 29.99 && t_k < t_exp + 2.0 * TV + 30.01,
            $sformatf("CKR at %0.2f after the frozen edge", t_k - t_exp));
      #(15625.0 - ($realtime - t_ref) - ph - 200.0);
      fref_dly = 0;
      #(200.0);
      check(npulse == 1, $sformatf("%0d frozen pulses in one period", npulse));
      check(ckr == 1'b1, "CKR high before the next reference edge");
    end
    check(n_high > 50 && n_low > 50, "both CKVD2 levels seen at the reference edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
