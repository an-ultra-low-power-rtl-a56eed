// bank_fsm: DCO bank sequencer.
//
// After a frequency search is triggered (rising edge of 'search', or reset
// release with 'search' already high) the loop steers the PVT bank, then the
// acquisition bank, then the tracking bank, skipping any bank whose bank_en
// bit is clear. PVT lasts 16 << pvt_mode CKR cycles and acquisition
// 16 << ab_mode cycles; tracking lasts until the next search. With 'search'
// low the sequencer sits in BANK_OPEN, the open-loop test mode in which the
// loop filter passes the SPI words to the DCO. The order of the banks follows
// the design description; the trigger, the duration encoding and the
// skipping rule are this design's choice.
module bank_fsm
  import adpll_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      search,
  input  logic [2:0] bank_en,   // {TRK, ACQ, PVT}
  input  logic [2:0] pvt_mode,
  input  logic [2:0] ab_mode,
  output bank_sel_e bank_sel
);
  timeunit 1ps; timeprecision 1fs;

  logic        search_q;
  logic [10:0] timer;
  bank_sel_e   state;

  assign bank_sel = state;

  function automatic bank_sel_e first_from(input bank_sel_e from, input logic [2:0] en);
    bank_sel_e r;
    r = BANK_OPEN;
    if (from == BANK_PVT && en[0])                       r = BANK_PVT;
    else if ((from == BANK_PVT || from == BANK_ACQ) && en[1]) r = BANK_ACQ;
    else if (en[2])                                      r = BANK_TRK;
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= BANK_OPEN;
      search_q <= 1'b0;
      timer    <= '0;
    end else begin
      search_q <= search;
      if (!search) begin
        state <= BANK_OPEN;
        timer <= '0;
      end else if (!search_q) begin
        state <= first_from(BANK_PVT, bank_en);
        timer <= '0;
      end else begin
        unique case (state)
          BANK_PVT: begin
            if (timer == (11'd16 << pvt_mode) - 11'd1) begin
              state <= first_from(BANK_ACQ, bank_en);
              timer <= '0;
            end else timer <= timer + 1'b1;
          end
          BANK_ACQ: begin
            if (timer == (11'd16 << ab_mode) - 11'd1) begin
              state <= first_from(BANK_TRK, bank_en);
              timer <= '0;
            end else timer <= timer + 1'b1;
          end
          default: timer <= '0;
        endcase
      end
    end
  end
endmodule
