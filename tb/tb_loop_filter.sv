// Testbench for loop_filter. A longint model of the three bank filters
// runs alongside the DUT. Sequence: open loop (SPI words pass through),
// PVT bank with a random phase error (type-I, saturation at both ends),
// acquisition bank (PVT word frozen), tracking bank (type-II integral
// build-up, fractional bits for the sigma-delta), the DCO-path modulation
// offset, the IIR option (smaller first response to a phase step, same final
// value) and the zero-phase pulse on every bank change.
module tb_loop_filter;
  import adpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  bank_sel_e bank_sel = BANK_OPEN;
  logic signed [PHE_W-1:0] phe = 0;
  logic [PVT_W-1:0] mem_pvt = 5'd4;
  logic [ACQ_W-1:0] mem_acq = 6'd6;
  logic [TRK_W-1:0] mem_trk = 9'd256;
  logic [2:0] kdco_p = 3, kdco_a = 6, alpha_t = 1, lambda = 2;
  logic [1:0] alpha_p = 2, alpha_a = 0;
  logic [7:0] kdco_t = 131;
  logic [4:0] rho = 5;
  logic iir_en = 0;
  logic signed [15:0] mod_trk = 0;
  logic [PVT_W-1:0] otw_pvt;
  logic [ACQ_W-1:0] otw_acq;
  logic [TRK_W-1:0] otw_trk;
  logic [SD_W-1:0] trk_frac;
  logic zph;

  longint m_integ = 0, e_sum, e_pvt, e_acq, e_trk, e_frac;
  int zph_count = 0, n_trk;
  int last_pvt, last_acq, first_resp, final_resp;

  loop_filter dut (.clk, .rst_n, .bank_sel, .phe, .mem_pvt, .mem_acq, .mem_trk, .kdco_p, .alpha_p,
                   .kdco_a, .alpha_a, .kdco_t, .alpha_t, .rho, .iir_en, .lambda, .mod_trk,
                   .otw_pvt, .otw_acq, .otw_trk, .trk_frac, .zph);

  always #5 clk = ~clk;
  always @(posedge clk) if (zph) zph_count++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic longint clampl(longint v, longint hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  // one cycle with the IIR off; checks the model against the DUT
  task automatic cyc(input bank_sel_e sel, input longint ph);
    bit z;
    longint pe, pp;
    @(negedge clk);
    bank_sel = sel; phe = PHE_W'(ph);
    #1 z = zph;
    pe = z ? 0 : ph;
    if (sel == BANK_TRK) m_integ = m_integ + ((pe * longint'(kdco_t)) >>> rho);
    else m_integ = 0;
    e_sum = (longint'(mem_trk) <<< 16) + longint'(mod_trk) * 2048;
    if (sel == BANK_TRK) e_sum = e_sum + ((pe * longint'(kdco_t)) >>> alpha_t) + m_integ;
    if (e_sum < 0) begin e_trk = 0; e_frac = 0; end
    else if ((e_sum >>> 16) > 511) begin e_trk = 511; e_frac = 0; end
    else begin e_trk = e_sum >>> 16; e_frac = (e_sum >>> 11) & 31; end
    pp = (((pe * longint'(kdco_p)) >>> alpha_p) + 32768) >>> 16;
    e_pvt = clampl(longint'(mem_pvt) + pp, 31);
    pp = (((pe * longint'(kdco_a)) >>> alpha_a) + 32768) >>> 16;
    e_acq = clampl(longint'(mem_acq) + pp, 63);
    @(posedge clk); #1;
    case (sel)
      BANK_OPEN: check(otw_pvt == mem_pvt && otw_acq == mem_acq, "open loop words");
      BANK_PVT:  check(otw_pvt == PVT_W'(e_pvt) && otw_acq == mem_acq,
                       $sformatf("pvt %0d exp %0d", otw_pvt, e_pvt));
      BANK_ACQ:  check(otw_acq == ACQ_W'(e_acq) && otw_pvt == PVT_W'(last_pvt),
                       $sformatf("acq %0d exp %0d, pvt frozen", otw_acq, e_acq));
      default:   check(otw_acq == ACQ_W'(last_acq) && otw_pvt == PVT_W'(last_pvt), "pvt/acq frozen");
    endcase
    check(otw_trk == TRK_W'(e_trk) && trk_frac == SD_W'(e_frac),
          $sformatf("trk %0d.%0d exp %0d.%0d", otw_trk, trk_frac, e_trk, e_frac));
    if (sel == BANK_PVT) last_pvt = otw_pvt;
    if (sel == BANK_ACQ || sel == BANK_OPEN) last_acq = otw_acq;
    if (sel == BANK_OPEN) last_pvt = otw_pvt;
  endtask

  initial begin
    #2 rst_n = 0; #6 rst_n = 1;
    repeat (5) cyc(BANK_OPEN, 0);
    mem_pvt = 5'd17; mem_acq = 6'd40; mem_trk = 9'd300;
    repeat (3) cyc(BANK_OPEN, 123456);
    mem_pvt = 5'd12; mem_acq = 6'd30; mem_trk = 9'd256;
    // PVT: random errors within and beyond the range
    repeat (100) cyc(BANK_PVT, longint'($urandom_range(2000000)) - 1000000);
    cyc(BANK_PVT, 64'sd100 * 65536);
    check(otw_pvt == 5'd31, "pvt saturates high");
    cyc(BANK_PVT, -64'sd100 * 65536);
    check(otw_pvt == 5'd0, "pvt saturates low");
    repeat (2) cyc(BANK_PVT, 200000);
    // ACQ
    repeat (100) cyc(BANK_ACQ, longint'($urandom_range(600000)) - 300000);
    repeat (2) cyc(BANK_ACQ, -40000);
    // TRK: constant error builds the integral up, then random
    repeat (50) cyc(BANK_TRK, 3000);
    repeat (50) cyc(BANK_TRK, -3000);
    repeat (200) cyc(BANK_TRK, longint'($urandom_range(20000)) - 10000);
    // modulation offset
    mod_trk = 16'sd1000; repeat (5) cyc(BANK_TRK, 0);
    mod_trk = -16'sd777; repeat (5) cyc(BANK_TRK, 0);
    mod_trk = 0;         repeat (5) cyc(BANK_OPEN, 0);
    check(zph_count == 4, $sformatf("zero-phase pulses %0d, expected 4", zph_count));
    // IIR on the proportional path: step response grows over several cycles
    iir_en = 1; kdco_t = 8'd128; alpha_t = 0; rho = 5'd31;
    @(negedge clk) bank_sel = BANK_TRK; phe = 0;
    repeat (20) @(negedge clk);
    phe = PHE_W'(2048);
    @(posedge clk); #1 first_resp = int'(otw_trk) - 256;
    repeat (200) @(posedge clk);
    #1 final_resp = int'(otw_trk) - 256;
    check(final_resp inside {3, 4}, $sformatf("IIR final response %0d, expected 4", final_resp));
    check(first_resp < final_resp, $sformatf("IIR first response %0d below final", first_resp));
    iir_en = 0; @(posedge clk); #1;
    check(int'(otw_trk) - 256 == 4, "IIR bypass gives the direct response");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
