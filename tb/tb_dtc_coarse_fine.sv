// Testbench for the behavioural DTC model: for random thermometer words
// measures the delay of rising and falling reference edges and compares it
// with 150 ps + 58 ps per coarse cell + 2 ps per fine cell; checks the
// minimum and maximum delay.
module tb_dtc_coarse_fine;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic fref_in = 0, fref_dly;
  logic [15:0] coarse_th = 0;
  logic [31:0] fine_th = 0;
  real t_in, d, e;

  dtc_coarse_fine dut (.fref_in, .coarse_th, .fine_th, .fref_dly);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic edge_test(input logic lvl);
    #5000;
    fref_in = lvl; t_in = $realtime;
    @(fref_dly);
    d = $realtime - t_in;
    e = 150.0 + 58.0 * $countones(coarse_th) + 2.0 * $countones(fine_th);
    check(fref_dly == lvl && d > e - 0.01 && d < e + 0.01,
          $sformatf("delay %0.3f ps expected %0.3f ps", d, e));
  endtask

  initial begin
    #1000;
    edge_test(1); edge_test(0);
    coarse_th = '1; fine_th = '1;
    edge_test(1); edge_test(0);
    check(d > 1141.9 && d < 1142.1, "full-scale delay 1142 ps");
    repeat (200) begin
      coarse_th = 16'($urandom); fine_th = $urandom;
      edge_test(~fref_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
