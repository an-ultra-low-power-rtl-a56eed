// Testbench for kdtc_lms: checks that the estimate follows the SPI value
// while calibration is off, that each update moves by 2^(11-mu) LSBs in the
// direction sign(bb)*sign(p-1/2), and that a closed-loop toy model (a DTC
// whose true gain differs from the initial estimate, observed through a
// bang-bang sign) converges to the true gain.
module tb_kdtc_lms;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, cal_en = 0, bb = 0;
  logic [15:0] init_val = 16'd50000, inv_kdtc, prev_v;
  logic [3:0] mu = 4'd11;
  logic [16:0] p = 17'h04000;
  real true_gain, err;

  kdtc_lms dut (.clk, .rst_n, .cal_en, .init_val, .mu, .bb, .p, .inv_kdtc);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2 rst_n = 0; #10 rst_n = 1;
    @(negedge clk);
    check(inv_kdtc == 16'd50000, "follows init value");
    init_val = 16'd51234; @(negedge clk);
    check(inv_kdtc == 16'd51234, "follows a new init value");
    cal_en = 1;
    for (int m = 7; m <= 11; m++) begin
      mu = 4'(m);
      repeat (20) begin
        prev_v = inv_kdtc;
        bb = 1'($urandom); p = 1'($urandom) ? 17'h0C000 : 17'h04000;
        @(negedge clk);
        if (bb == (p > 17'h08000))
          check(inv_kdtc == prev_v + 16'(1 << (11 - m)), $sformatf("up step mu=%0d", m));
        else
          check(inv_kdtc == prev_v - 16'(1 << (11 - m)), $sformatf("down step mu=%0d", m));
      end
    end
    // toy loop: residual timing error = (true - estimate) * p + noise
    mu = 4'd9;
    true_gain = 58081.0;
    repeat (6000) begin
      p   = 17'($urandom_range(65536, 1));
      err = (true_gain - real'(inv_kdtc)) * (real'(p) / 65536.0 - 0.5) + (real'($urandom_range(2000)) - 1000.0) * 0.05;
      bb  = (err > 0);
      @(negedge clk);
    end
    check((real'(inv_kdtc) - true_gain) < 300.0 && (true_gain - real'(inv_kdtc)) < 300.0,
          $sformatf("converged to %0d, true %0.0f", inv_kdtc, true_gain));
    cal_en = 0; @(negedge clk);
    check(inv_kdtc == 16'd51234, "returns to init value when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
