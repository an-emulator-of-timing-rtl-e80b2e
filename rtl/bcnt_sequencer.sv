// bcnt_sequencer: loads BCID and event number on the BCnt<11:0> bus.
//
// On every L1A the TTCrx puts three words on its 12-bit BCnt bus, one per
// clock, each with its own strobe: the bunch-crossing number of the L1A
// with BCntStr, in the same clock as L1Accept; then the low half of the
// event number EVID<11:0> with EvCntLStr; then the high half EVID<23:12>
// with EvCntHStr. This module reproduces that sequence.
//
// Interface: in the clock where fire is high, bcid and evid must carry the
// L1A's bunch number and event number; they are captured then. The bus
// and strobes are registered: word 0 appears one clock after fire, words 1
// and 2 in the two clocks after that. The bus keeps its last word when no
// sequence runs. A new fire must come at least 3 clocks after the last
// (l1a_controller's dead time ensures it; an assertion checks it).
//
// Taken from the original emulator design: words, order, strobes and one word per
// clock. Own choice: the bus holds its last value between sequences.
module bcnt_sequencer
  import ttc_emu_pkg::*;
(
  input  logic              clk,
  input  logic              rst,         // synchronous, active high
  input  logic              fire,        // L1A in this clock
  input  logic [BCID_W-1:0] bcid,
  input  logic [EVID_W-1:0] evid,
  output logic [BCID_W-1:0] bcnt,        // BCnt<11:0>
  output logic              bcnt_str,    // BCntStr
  output logic              evcnt_lstr,  // EvCntLStr
  output logic              evcnt_hstr   // EvCntHStr
);

  logic [EVID_W-1:0] ev_q;
  logic [1:0]        step_q;   // 0: idle, 1: low half next, 2: high half next

  always_ff @(posedge clk) begin
    if (rst) begin
      ev_q       <= '0;
      step_q     <= 2'd0;
      bcnt       <= '0;
      bcnt_str   <= 1'b0;
      evcnt_lstr <= 1'b0;
      evcnt_hstr <= 1'b0;
    end else begin
      bcnt_str   <= 1'b0;
      evcnt_lstr <= 1'b0;
      evcnt_hstr <= 1'b0;
      if (fire) begin
        ev_q     <= evid;
        bcnt     <= bcid;
        bcnt_str <= 1'b1;
        step_q   <= 2'd1;
      end else if (step_q == 2'd1) begin
        bcnt       <= ev_q[11:0];
        evcnt_lstr <= 1'b1;
        step_q     <= 2'd2;
      end else if (step_q == 2'd2) begin
        bcnt       <= ev_q[23:12];
        evcnt_hstr <= 1'b1;
        step_q     <= 2'd0;
      end
    end
  end

  // A new L1A may not cut a running sequence short
  a_no_overlap: assert property (@(posedge clk) disable iff (rst)
                                 fire |-> step_q == 2'd0);

endmodule
