// event_counter: the 24-bit event number (EVID) of the TTC emulator.
//
// Every Level-1 Accept takes the current count as its event number and
// advances the counter by one; the event-counter reset broadcast
// (EvCntRes) clears it. In the real TTC system the event number sent on
// the BCnt bus and the event/orbit counter sent on Dout come from two
// different counters; the emulator uses this one counter for both, so
// EvCntRes clears the number seen on both buses.
//
// Interface: evid is the number the next (or current) L1A receives; l1a
// advances it on the clock edge. If l1a and evcnt_reset meet in one clock,
// that L1A keeps the old number and the counter then restarts at 0.
//
// Taken from the original emulator design: 24 bits, one counter for both buses, cleared
// by EvCntRes. Own choice: the first event after a reset is number 0.
module event_counter
  import ttc_emu_pkg::*;
(
  input  logic              clk,
  input  logic              rst,          // synchronous, active high
  input  logic              l1a,          // one-clock L1A
  input  logic              evcnt_reset,  // one-clock EvCntRes
  output logic [EVID_W-1:0] evid
);

  always_ff @(posedge clk) begin
    if (rst || evcnt_reset) evid <= '0;
    else if (l1a)           evid <= evid + 1'b1;
  end

endmodule
