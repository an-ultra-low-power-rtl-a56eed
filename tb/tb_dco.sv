// Testbench for the behavioural DCO model: for random bank words measures
// the average output frequency over 2000 periods and compares it with
// F_BASE + sum(word * step); checks that the tracking dither bit adds one
// tracking step and that higher words give higher frequency.
module tb_dco;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic [4:0] otw_pvt = 0;
  logic [5:0] otw_acq = 0;
  logic [8:0] otw_trk = 0;
  logic trk_dither = 0, ckv;
  real t0, f_meas, f_exp, f_prev;

  dco dut (.otw_pvt, .otw_acq, .otw_trk, .trk_dither, .ckv);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic measure(output real f);
    repeat (3) @(posedge ckv);
    t0 = $realtime;
    repeat (2000) @(posedge ckv);
    f = 2000.0 / (($realtime - t0) * 1.0e-12);
  endtask

  initial begin
    f_prev = 0.0;
    for (int i = 0; i < 12; i++) begin
      otw_pvt = 5'($urandom); otw_acq = 6'($urandom); otw_trk = 9'($urandom); trk_dither = 0;
      if (i == 0) begin otw_pvt = 0; otw_acq = 0; otw_trk = 0; end
      measure(f_meas);
      f_exp = 2.15e9 + otw_pvt * 21.83e6 + otw_acq * 2.467e6 + otw_trk * 30.56e3;
      check((f_meas - f_exp) < 2.0e3 && (f_exp - f_meas) < 2.0e3,
            $sformatf("f %0.0f Hz expected %0.0f Hz", f_meas, f_exp));
      trk_dither = 1;
      measure(f_prev);
      check((f_prev - f_meas) > 28.0e3 && (f_prev - f_meas) < 33.0e3,
            $sformatf("dither step %0.0f Hz", f_prev - f_meas));
    end
    // monotonic in every bank
    otw_pvt = 10; otw_acq = 20; otw_trk = 100; trk_dither = 0; measure(f_prev);
    otw_trk = 101; measure(f_meas); check(f_meas > f_prev, "tracking bank monotonic");
    otw_acq = 21; measure(f_prev); check(f_prev > f_meas, "acquisition bank monotonic");
    otw_pvt = 11; measure(f_meas); check(f_meas > f_prev, "PVT bank monotonic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
