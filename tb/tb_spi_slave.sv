// Testbench for spi_slave. A mode-0 SPI master task (10 MHz SCLK) writes
// and reads 16-bit frames. Checks: reset defaults of all 20 configuration
// registers, write/read-back of random data, decoding of several cfg fields,
// read-back of the status inputs (addresses 32-44), that writes beyond the
// register file and aborted frames change nothing, and that spi_rst_n
// restores the defaults.
module tb_spi_slave;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic spi_rst_n = 1, sclk = 0, cs_n = 0, mosi = 0, miso;
  adpll_status_t status;
  adpll_cfg_t cfg;
  logic [7:0] rd, shadow [20];
  localparam logic [7:0] DEF [20] = '{
    8'hE1, 8'hDC, 8'hE2, 8'h00, 8'h06, 8'h00, 8'h26, 8'h11, 8'h04, 8'h06,
    8'h00, 8'h81, 8'h08, 8'h49, 8'h6C, 8'h2B, 8'hFF, 8'hFF, 8'h0B, 8'h1D
  };

  spi_slave dut (.spi_rst_n, .sclk, .cs_n, .mosi, .miso, .status, .cfg);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic xfer(input logic [15:0] word, output logic [7:0] rx, input int nbits = 16);
    rx = '0;
    cs_n = 0; #50000;
    for (int i = 15; i >= 16 - nbits; i--) begin
      mosi = word[i]; #50000;
      sclk = 1;
      if (i < 8) rx = {rx[6:0], miso};
      #50000 sclk = 0;
    end
    #50000 cs_n = 1; #100000;
  endtask

  task automatic wr(input int a, input logic [7:0] d);
    logic [7:0] dummy;
    xfer({1'b0, 7'(a), d}, dummy);
  endtask

  task automatic rdreg(input int a, output logic [7:0] d);
    xfer({1'b1, 7'(a), 8'h00}, d);
  endtask

  initial begin
    status = '0;
    #500 cs_n = 1;
    #1000 spi_rst_n = 0; #1000 spi_rst_n = 1;
    for (int a = 0; a < 20; a++) begin
      rdreg(a, rd);
      check(rd == DEF[a], $sformatf("default reg %0d = %h, expected %h", a, rd, DEF[a]));
    end
    check(cfg.fcw == {7'd38, 16'd6} && cfg.bank_en == 3'b111 && cfg.search == 1'b1 &&
          cfg.inv_kdtc == 16'hE2DC && cfg.kres == 9'd511 && cfg.cf_ratio == 6'd29,
          "default fields");
    for (int a = 0; a < 20; a++) begin
      shadow[a] = 8'($urandom);
      wr(a, shadow[a]);
    end
    for (int a = 0; a < 20; a++) begin
      rdreg(a, rd);
      check(rd == shadow[a], $sformatf("reg %0d read %h, wrote %h", a, rd, shadow[a]));
    end
    check(cfg.fcw == {shadow[6][6:0], shadow[5], shadow[4]}, "fcw field");
    check(cfg.inv_kdtc == {shadow[2], shadow[1]}, "inv_kdtc field");
    check(cfg.kdco_t == shadow[16] && cfg.rho == shadow[12][4:0], "gain fields");
    check(cfg.bank_en == shadow[0][7:5] && cfg.div_off == shadow[0][0], "control fields");
    check(cfg.kres == {shadow[18][0], shadow[17]} && cfg.search == shadow[18][3], "reg 17/18 fields");
    // writes outside the register file and an aborted frame are ignored
    wr(25, 8'h55); wr(7'h60, 8'h55);
    xfer({1'b0, 7'd3, 8'h5A}, rd, 12);
    for (int a = 0; a < 20; a++) begin
      rdreg(a, rd);
      check(rd == shadow[a], $sformatf("reg %0d disturbed", a));
    end
    rdreg(25, rd); check(rd == 8'h00, "unused address reads zero");
    // status read-back
    status.phe = 28'h9A5C3E1; status.otw_pvt = 5'd19; status.otw_acq = 6'd45;
    status.otw_trk = 9'h1A7; status.dtc_coarse = 4'd11; status.dtc_fine = 5'd27;
    status.inv_kdtc = 16'hBEEF; status.bank_sel = 2'd3; status.locked = 1'b1;
    rdreg(32, rd); check(rd == 8'hE1, "phe byte 0");
    rdreg(33, rd); check(rd == 8'hC3, "phe byte 1");
    rdreg(34, rd); check(rd == 8'hA5, "phe byte 2");
    rdreg(35, rd); check(rd == 8'h09, "phe byte 3");
    rdreg(36, rd); check(rd == 8'd19, "pvt word");
    rdreg(37, rd); check(rd == 8'd45, "acq word");
    rdreg(38, rd); check(rd == 8'hA7, "trk word low");
    rdreg(39, rd); check(rd == 8'h01, "trk word high");
    rdreg(40, rd); check(rd == 8'd11, "coarse DTC word");
    rdreg(41, rd); check(rd == 8'd27, "fine DTC word");
    rdreg(42, rd); check(rd == 8'hEF, "inv_kdtc low");
    rdreg(43, rd); check(rd == 8'hBE, "inv_kdtc high");
    rdreg(44, rd); check(rd == 8'h07, "lock and bank");
    // SPI reset restores the defaults
    #1000 spi_rst_n = 0; #1000 spi_rst_n = 1;
    for (int a = 0; a < 20; a++) begin
      rdreg(a, rd);
      check(rd == DEF[a], $sformatf("reg %0d after reset = %h", a, rd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
