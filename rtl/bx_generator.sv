// bx_generator: LHC bunch-crossing (BX) timing inside the TTC emulator.
//
// A bunch counter runs from 0 to ORBIT_LEN-1 on every clock and wraps, one
// wrap per LHC orbit. A constant table, built at elaboration from the
// nominal 25 ns LHC filling scheme (see ttc_emu_pkg::lhc_fill_pattern),
// tells for each bunch slot whether it holds a bunch; that flag is the BX
// signal. BX is not brought to a pin; it gates Level-1 Accepts, which must
// coincide with a filled bunch, and drives the random trigger generator.
//
// Interface: bcid is the number of the current slot, bx is high when the
// slot is filled, orbit_start is high in slot 0. A one-clock pulse on
// bcnt_reset (the bunch-counter reset broadcast) loads slot 0 on the next
// clock. All outputs are combinational from the counter register, valid in
// the same clock as bcid.
//
// Taken from the original emulator design: a BX structure identical to the LHC
// one. Own choices: the exact order of long gaps in the filling scheme,
// and that an external bunch-counter reset re-aligns the orbit.
module bx_generator
  import ttc_emu_pkg::*;
#(
  parameter int unsigned ORBIT_LEN = BX_PER_ORBIT
) (
  input  logic              clk,
  input  logic              rst,          // synchronous, active high
  input  logic              bcnt_reset,   // one-clock pulse: restart orbit
  output logic [BCID_W-1:0] bcid,
  output logic              bx,           // current slot holds a bunch
  output logic              orbit_start
);

  localparam logic [BX_PER_ORBIT-1:0] FILL = lhc_fill_pattern();

  logic [BCID_W-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (rst || bcnt_reset)                     cnt_q <= '0;
    else if (cnt_q == BCID_W'(ORBIT_LEN - 1))  cnt_q <= '0;
    else                                       cnt_q <= cnt_q + 1'b1;
  end

  assign bcid        = cnt_q;
  assign bx          = (cnt_q < BCID_W'(BX_PER_ORBIT)) ? FILL[cnt_q] : 1'b0;
  assign orbit_start = (cnt_q == '0);

endmodule
