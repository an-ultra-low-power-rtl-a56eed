// Testbench for bbpd: places the frozen variable edge before and after the
// compensated reference edge at random offsets and checks the early/late
// decision, and that the decision holds between edges.
module tb_bbpd;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic ckvd2f = 0, ref_cmp = 0, rst_n = 1, bb;
  int ofs;

  bbpd dut (.ckvd2f, .ref_cmp, .rst_n, .bb);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10 rst_n = 0; #10 rst_n = 1;
    check(bb == 0, "reset value");
    repeat (200) begin
      ofs = int'($urandom_range(400)) - 200;   // variable edge minus reference edge, ps
      if (ofs == 0) ofs = 1;
      if (ofs > 0) begin
        #1000 ref_cmp = 1; #(ofs) ckvd2f = 1;
      end else begin
        #1000 ckvd2f = 1; #(-ofs) ref_cmp = 1;
      end
      #300 ckvd2f = 0;
      check(bb == (ofs > 0), $sformatf("offset %0d ps gave bb=%0d", ofs, bb));
      #2000 ref_cmp = 0;
      #500;
      check(bb == (ofs > 0), "decision held until next edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
