// Testbench for bank_fsm: measures how many CKR cycles each bank stays
// selected for several pvt_mode/ab_mode settings (expected 16 << mode),
// checks the PVT -> ACQ -> TRK order, the skipping of disabled banks and the
// return to open loop when 'search' drops.
module tb_bank_fsm;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, search = 0;
  logic [2:0] bank_en = 3'b111, pvt_mode = 0, ab_mode = 0;
  bank_sel_e bank_sel;
  int n;

  bank_fsm dut (.clk, .rst_n, .search, .bank_en, .pvt_mode, .ab_mode, .bank_sel);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(input logic [2:0] en, input logic [2:0] pm, input logic [2:0] am);
    bank_en = en; pvt_mode = pm; ab_mode = am;
    @(negedge clk) search = 0;
    repeat (3) @(negedge clk);
    check(bank_sel == BANK_OPEN, "open loop while search is low");
    search = 1;
    @(negedge clk);
    if (en[0]) begin
      n = 0;
      while (bank_sel == BANK_PVT && n < 5000) begin n++; @(negedge clk); end
      check(n == (16 << pm), $sformatf("PVT lasted %0d, expected %0d", n, 16 << pm));
    end
    if (en[1]) begin
      check(bank_sel == BANK_ACQ, "acquisition follows");
      n = 0;
      while (bank_sel == BANK_ACQ && n < 5000) begin n++; @(negedge clk); end
      check(n == (16 << am), $sformatf("ACQ lasted %0d, expected %0d", n, 16 << am));
    end
    if (en[2]) begin
      check(bank_sel == BANK_TRK, "tracking follows");
      repeat (500) @(negedge clk);
      check(bank_sel == BANK_TRK, "tracking is kept");
    end else begin
      check(bank_sel == BANK_OPEN, "no tracking bank: open");
    end
  endtask

  initial begin
    #2 rst_n = 0; #10 rst_n = 1;
    run(3'b111, 3'd1, 3'd2);
    run(3'b111, 3'd0, 3'd0);
    run(3'b111, 3'd3, 3'd1);
    run(3'b110, 3'd1, 3'd1);
    run(3'b101, 3'd2, 3'd1);
    run(3'b011, 3'd0, 3'd0);
    run(3'b100, 3'd0, 3'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
