// Testbench for tx_interface: random FCW, TX data and gain; checks the
// reference-path FCW sum and the DCO-path scaled offset one clock later,
// and that both paths are quiet with mod_on = 0.
module tb_tx_interface;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, mod_on;
  logic [22:0] fcw, fcw_mod;
  logic signed [9:0] tx_data;
  logic [5:0] inv_kdcomod;
  logic signed [15:0] mod_trk;
  longint e_fcw, e_mod;

  tx_interface dut (.clk, .rst_n, .fcw, .tx_data, .mod_on, .inv_kdcomod, .fcw_mod, .mod_trk);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    fcw = 0; tx_data = 0; mod_on = 0; inv_kdcomod = 0;
    #2 rst_n = 0; #10 rst_n = 1;
    repeat (300) begin
      @(negedge clk);
      fcw = 23'($urandom); tx_data = 10'($urandom); mod_on = 1'($urandom); inv_kdcomod = 6'($urandom);
      e_fcw = mod_on ? ((longint'(fcw) + longint'(tx_data)) & 64'h7F_FFFF) : longint'(fcw);
      e_mod = mod_on ? ((longint'(tx_data) * longint'(inv_kdcomod)) >>> 4) : 0;
      @(negedge clk);
      check(longint'(fcw_mod) == e_fcw, $sformatf("fcw_mod %h expected %h", fcw_mod, e_fcw));
      check(longint'(mod_trk) == e_mod, $sformatf("mod_trk %0d expected %0d", mod_trk, e_mod));
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
