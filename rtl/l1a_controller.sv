// l1a_controller: issues the Level-1 Accept of the TTC emulator.
//
// A jumper (src_ext) selects the trigger source: the internal generator or
// the shaped external Lemo input. A request from the selected source is
// remembered until it can be issued. An L1A is issued (fire) only in a
// clock whose bunch slot is filled, so every L1A coincides with a bunch
// crossing, also an external one. It is further held while the emulator
// is in its L1A dead time (DEAD_CLK clocks from the previous L1A, the time
// the BCnt and Dout buses need to send one event) or while hold is high
// (the Dout event queue is full). Requests that arrive while one is
// already waiting merge with it.
//
// Interface: fire is combinational, in the clock of the bunch the L1A
// belongs to; the event counter, the BCnt sequencer and the Dout queue
// take it in that clock. l1accept is fire registered, a 25 ns pulse on the
// L1Accept pin one clock later, together with BCntStr.
//
// Taken from the original emulator design: source selection by jumper, coincidence with
// BX for both sources. Own choices: the dead time, waiting for the next
// filled bunch rather than dropping, and merging of close requests.
module l1a_controller
  import ttc_emu_pkg::*;
#(
  parameter int unsigned DEAD_CLK = 4
) (
  input  logic clk,
  input  logic rst,        // synchronous, active high
  input  logic src_ext,    // 1: external Lemo L1A, 0: internal generator
  input  logic int_req,    // one-clock internal request
  input  logic ext_req,    // one-clock shaped external request
  input  logic bx,         // current bunch slot is filled
  input  logic hold,       // downstream cannot take an event
  output logic fire,       // L1A issued in this clock
  output logic pending,    // a request is waiting
  output logic l1accept    // registered L1Accept output
);

  localparam int unsigned DW = (DEAD_CLK > 1) ? $clog2(DEAD_CLK) : 1;

  logic          req, want, pend_q;
  logic [DW-1:0] dead_q;

  assign req     = src_ext ? ext_req : int_req;
  assign want    = req || pend_q;
  assign fire    = want && bx && (dead_q == '0) && !hold;
  assign pending = pend_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      pend_q   <= 1'b0;
      dead_q   <= '0;
      l1accept <= 1'b0;
    end else begin
      pend_q   <= want && !fire;
      l1accept <= fire;
      if (fire)              dead_q <= DW'(DEAD_CLK - 1);
      else if (dead_q != '0) dead_q <= dead_q - 1'b1;
    end
  end

endmodule
