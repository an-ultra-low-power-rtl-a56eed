// Testbench for lfsr4_galois: checks the first states against values worked
// out by hand for x^4 + x^3 + 1, the maximal period of 15 over all non-zero
// states, and that the state holds while en = 0.
module tb_lfsr4_galois;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, en = 0;
  logic [3:0] state;
  logic [15:0] seen;
  // 0001 -> 1100 -> 0110 -> 0011 -> 1101 -> 1010 -> 0101 -> 1110
  localparam logic [3:0] EXP [8] = '{4'h1, 4'hC, 4'h6, 4'h3, 4'hD, 4'hA, 4'h5, 4'hE};

  lfsr4_galois dut (.clk, .rst_n, .en, .state);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2 rst_n = 0; #10 rst_n = 1;
    @(negedge clk);
    check(state == 4'h1, "seed");
    repeat (5) begin @(negedge clk); check(state == 4'h1, "hold while disabled"); end
    en = 1;
    for (int i = 1; i < 8; i++) begin
      @(negedge clk);
      check(state == EXP[i], $sformatf("state %0d = %h, expected %h", i, state, EXP[i]));
    end
    seen = '0;
    repeat (15) begin @(negedge clk); seen[state] = 1'b1; end
    check(seen == 16'hFFFE, $sformatf("15 distinct non-zero states, got %h", seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
