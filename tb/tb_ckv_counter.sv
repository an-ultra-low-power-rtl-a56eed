// Testbench for ckv_counter: counts CKVD2 edges and checks the 7-bit count,
// including the wrap at 128, against an independent edge count.
module tb_ckv_counter;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic ckvd2 = 0, rst_n = 1;
  logic [6:0] count;
  int n = 0;

  ckv_counter #(.WIDTH(7)) dut (.ckvd2, .rst_n, .count);

  always #411 ckvd2 = ~ckvd2;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100 rst_n = 0; #1000 rst_n = 1;
    check(count == 0, "reset value");
    repeat (300) begin
      @(posedge ckvd2); n++; #1;
      check(count == 7'(n), $sformatf("count %0d after %0d edges", count, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
