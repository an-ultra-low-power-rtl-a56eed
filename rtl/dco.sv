// dco: behavioural model of the NMOS-only LC digitally controlled oscillator
// (not synthesizable).
//
// The tank capacitance is set by three switched-capacitor banks. Around
// the operating point each bank LSB moves the frequency by
//     df = 2 pi^2 L f^3 dC
// which with L = 8 nH, f = 2.4 GHz and the unit capacitors 10 fF (PVT,
// 5 bits), 1.13 fF (acquisition, 6 bits) and 14 aF (tracking, 9 bits) gives
// the default steps 21.8 MHz, 2.47 MHz and 30.6 kHz. The sigma-delta
// dither bit switches one more tracking unit. The model is linear in the
// words:
//     f = F_BASE + pvt*DF_PVT + acq*DF_ACQ + (trk + dither)*DF_TRK
// and raising a word raises the frequency (a set bit switches capacitance
// off), which is this model's convention. F_BASE puts the PVT range at
// 2.15-2.83 GHz so that, with the other banks, 2.2-3 GHz is covered.
// Edges are scheduled from an accumulated real-valued time, so the average
// frequency is exact despite the 1 fs time resolution. Optional white
// period jitter of up to +-JITTER_FS is added per half period.
module dco #(
  parameter real F_BASE_HZ = 2.15e9,
  parameter real DF_PVT_HZ = 21.83e6,
  parameter real DF_ACQ_HZ = 2.467e6,
  parameter real DF_TRK_HZ = 30.56e3,
  parameter int  JITTER_FS = 0
) (
  input  logic [4:0] otw_pvt,
  input  logic [5:0] otw_acq,
  input  logic [8:0] otw_trk,
  input  logic       trk_dither,
  output logic       ckv
);
  timeunit 1ps; timeprecision 1fs;

  real f_hz, t_next, jit;

  always_comb
    f_hz = F_BASE_HZ + real'(otw_pvt) * DF_PVT_HZ + real'(otw_acq) * DF_ACQ_HZ
           + (real'(otw_trk) + real'(trk_dither)) * DF_TRK_HZ;

  initial begin
    ckv    = 1'b0;
    t_next = 0.0;
    forever begin
      t_next = t_next + 0.5e12 / f_hz;
      jit    = (JITTER_FS > 0)
               ? real'(int'($urandom_range(2 * JITTER_FS)) - JITTER_FS) * 1.0e-3 : 0.0;
      #(t_next + jit - $realtime);
      ckv = ~ckv;
    end
  end
endmodule
