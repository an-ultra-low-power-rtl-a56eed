// Testbench for div2: checks that CKVD2 toggles on every CKV rising edge and
// that its period is twice the CKV period.
module tb_div2;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic ckv = 0, rst_n = 1, ckvd2, prev;
  realtime t_last = 0;

  div2 dut (.ckv, .rst_n, .ckvd2);

  always #205 ckv = ~ckv;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #50 rst_n = 0; #500 rst_n = 1;
    check(ckvd2 == 0, "reset value");
    repeat (100) begin
      prev = ckvd2;
      @(posedge ckv); #1;
      check(ckvd2 == !prev, "toggle on CKV rising edge");
    end
    @(posedge ckvd2); t_last = $realtime;
    repeat (10) begin
      @(posedge ckvd2);
      check($realtime - t_last == 820.0, $sformatf("CKVD2 period %0t", $realtime - t_last));
      t_last = $realtime;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
