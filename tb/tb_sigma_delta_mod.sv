// Testbench for sigma_delta_mod: for every 5-bit input the dither stream must
// contain exactly 'frac' ones in any 32 consecutive clocks once settled, and
// the running error against frac/32 must stay below one LSB.
module tb_sigma_delta_mod;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, dither;
  logic [4:0] frac = 0;
  int ones, err;

  sigma_delta_mod #(.W(5)) dut (.clk, .rst_n, .frac, .dither);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2 rst_n = 0; #10 rst_n = 1;
    for (int f = 0; f < 32; f++) begin
      @(negedge clk) frac = 5'(f);
      repeat (40) @(negedge clk);
      ones = 0; err = 0;
      repeat (32) begin
        @(negedge clk);
        ones += dither;
        err  += 32 * dither - f;
        if (err > 32 || err < -32) failures++;
      end
      check(ones == f, $sformatf("frac %0d gave %0d ones in 32 clocks", f, ones));
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
