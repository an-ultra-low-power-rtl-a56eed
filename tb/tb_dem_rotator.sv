// Testbench for dem_rotator: for random codes and rotation indices checks,
// on the 16-cell and 32-cell configurations, that the number of active
// cells equals the code and that each cell is on exactly when its position,
// moved back by the rotation, is below the code.
module tb_dem_rotator;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic [3:0]  code_c;
  logic [4:0]  code_f;
  logic [3:0]  idx;
  logic        rot_en;
  logic [15:0] th_c;
  logic [31:0] th_f;
  bit ok;
  int s;

  dem_rotator #(.N(16), .CW(4), .IDXW(4)) dut_c (.code(code_c), .idx, .rot_en, .therm(th_c));
  dem_rotator #(.N(32), .CW(5), .IDXW(4)) dut_f (.code(code_f), .idx, .rot_en, .therm(th_f));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400) begin
      code_c = 4'($urandom); code_f = 5'($urandom); idx = 4'($urandom); rot_en = 1'($urandom);
      #1;
      check($countones(th_c) == int'(code_c), "coarse: active cells");
      check($countones(th_f) == int'(code_f), "fine: active cells");
      ok = 1;
      for (int i = 0; i < 16; i++) begin
        s = rot_en ? int'(idx) : 0;
        if (th_c[i] != (((i + s) % 16) < int'(code_c))) ok = 0;
      end
      check(ok, $sformatf("coarse pattern code=%0d idx=%0d rot=%0d: %b", code_c, idx, rot_en, th_c));
      ok = 1;
      for (int i = 0; i < 32; i++) begin
        s = rot_en ? int'(idx) : 0;
        if (th_f[i] != (((i + s) % 32) < int'(code_f))) ok = 0;
      end
      check(ok, $sformatf("fine pattern code=%0d idx=%0d rot=%0d", code_f, idx, rot_en));
    end
    // example: code 5, index 3 -> cells 29..31 and 0..1 of the 32 are on
    code_f = 5; idx = 3; rot_en = 1; #1;
    check(th_f == 32'hE000_0003, $sformatf("worked example %h", th_f));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
