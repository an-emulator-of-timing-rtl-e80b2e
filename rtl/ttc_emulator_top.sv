// ttc_emulator_top: FPGA firmware of a stand-alone TTC emulator.
//
// A TTCrx mezzanine delivers the LHC clock, Level-1 Accepts (L1A), bunch
// and event numbers and broadcast commands to front-end electronics. This
// firmware produces the same signals, with the same timing relations, on
// the pins of a board that replaces the TTCrx test board, without any
// TTC network. Its parts:
//   bx_generator      LHC bunch counter and filled-bunch pattern (BX)
//   l1a_internal_gen  random and regular internal triggers (7 modes)
//   ext_pulse_shaper  x5, Lemo inputs cut to 25 ns synchronous pulses
//   l1a_controller    trigger source choice, coincidence with BX
//   event_counter     24-bit event number
//   bcnt_sequencer    BCID, EVID<11:0>, EVID<23:12> on BCnt<11:0>
//   dout_sequencer    trigger type and event counter on Dout, 4.4 us later
//   broadcast_emu     BCntRes, EvCntRes, Brcst<7:5> and strobes
//
// Clocking: everything runs on clk, which is Clock40Des1, the 40.08 MHz
// clock after the board's variable delay; the choice between the on-board
// oscillator and an external clock and the delay itself are made on the
// board, outside this logic. Reset_b from the mother board is asserted
// asynchronously and released synchronously; TTCReady rises one clock
// after release.
//
// Timing seen on the pins, with an L1A decided in clock k:
//   k+1      L1Accept, BCnt = BCID, BCntStr
//   k+2      BCnt = EVID<11:0>,  EvCntLStr
//   k+3      BCnt = EVID<23:12>, EvCntHStr
//   k+1+176  Dout = trigger type, SubAddr 00, DoutStr; then 01, 10, 11
// An external L1A leaves as L1Accept 50-75 ns after its leading edge (two
// clocks plus phase), or later if its bunch slot is empty or the dead time
// runs.
//
// Pins the emulator drives at fixed values: SubAddr<7:2> and DQ<3:0> are 0.
// The trigger type comes in on trigger_type, held by board switches.
// Following the emulated-pin list of the original emulator board; the fixed values and
// the trigger-type source are this design's choices.
module ttc_emulator_top
  import ttc_emu_pkg::*;
#(
  parameter int unsigned CLK_FREQ    = CLK_HZ,          // for rate constants
  parameter int unsigned DOUT_DELAY  = DOUT_DELAY_CLK,  // L1A to first Dout byte
  parameter int unsigned DEAD_CLK    = 4,               // L1A dead time, clocks
  parameter int unsigned QUEUE_DEPTH = 64               // events waiting for Dout
) (
  input  logic               clk,          // Clock40Des1
  input  logic               reset_b,      // Reset_b, active low, asynchronous
  // jumpers and switches
  input  logic               l1a_src_ext,  // 1: L1A from Lemo, 0: internal
  input  logic [2:0]         l1a_mode,     // internal mode, see l1a_mode_e
  input  logic [TTYPE_W-1:0] trigger_type,
  // Lemo inputs, asynchronous
  input  logic               lemo_l1a,
  input  logic               lemo_bcr,
  input  logic               lemo_ecr,
  input  logic               lemo_rst,     // drives Brcst<5> and Brcst<7>
  input  logic               lemo_brcst6,
  // TTCrx pins
  output logic               l1accept,     // L1Accept
  output logic [BCID_W-1:0]  bcnt,         // BCnt<11:0>
  output logic               bcnt_str,     // BCntStr
  output logic               evcnt_lstr,   // EvCntLStr
  output logic               evcnt_hstr,   // EvCntHStr
  output logic               bcnt_res,     // BcntRes
  output logic               evcnt_res,    // EvCntRes
  output logic [7:2]         brcst,        // Brcst<7:2>
  output logic               brcst_str1,   // BrcstStr1
  output logic               brcst_str2,   // BrcstStr2
  output logic [7:0]         sub_addr,     // SubAddr<7:0>
  output logic [3:0]         dq,           // DQ<3:0>
  output logic [7:0]         dout,         // Dout<7:0>
  output logic               dout_str,     // DoutStr
  output logic               ttc_ready     // TTCReady
);

  // Reset: asynchronous assertion, synchronous release
  logic rst_meta_q, rst;
  always_ff @(posedge clk or negedge reset_b) begin
    if (!reset_b) begin
      rst_meta_q <= 1'b1;
      rst        <= 1'b1;
    end else begin
      rst_meta_q <= 1'b0;
      rst        <= rst_meta_q;
    end
  end

  always_ff @(posedge clk or negedge reset_b) begin
    if (!reset_b) ttc_ready <= 1'b0;
    else          ttc_ready <= !rst;
  end

  // Lemo inputs
  logic ext_l1a_p, bcr_p, ecr_p, rstb_p, b6_p;
  ext_pulse_shaper u_sh_l1a (.clk, .rst, .async_in(lemo_l1a),    .pulse(ext_l1a_p));
  ext_pulse_shaper u_sh_bcr (.clk, .rst, .async_in(lemo_bcr),    .pulse(bcr_p));
  ext_pulse_shaper u_sh_ecr (.clk, .rst, .async_in(lemo_ecr),    .pulse(ecr_p));
  ext_pulse_shaper u_sh_rst (.clk, .rst, .async_in(lemo_rst),    .pulse(rstb_p));
  ext_pulse_shaper u_sh_b6  (.clk, .rst, .async_in(lemo_brcst6), .pulse(b6_p));

  broadcast_emu u_brcst (
    .clk, .rst,
    .bcr_in(bcr_p), .ecr_in(ecr_p), .rst_in(rstb_p), .b6_in(b6_p),
    .bcnt_res, .evcnt_res, .brcst, .brcst_str1, .brcst_str2
  );

  // Bunch structure
  logic [BCID_W-1:0] bcid;
  logic              bx, orbit_start;
  bx_generator u_bx (
    .clk, .rst, .bcnt_reset(bcnt_res), .bcid, .bx, .orbit_start
  );

  // Trigger
  logic int_req, fire, l1a_pending, queue_full;
  l1a_internal_gen #(.CLK_FREQ(CLK_FREQ)) u_gen (
    .clk, .rst, .mode(l1a_mode_e'(l1a_mode)), .bx, .req(int_req)
  );

  l1a_controller #(.DEAD_CLK(DEAD_CLK)) u_ctl (
    .clk, .rst, .src_ext(l1a_src_ext), .int_req, .ext_req(ext_l1a_p), .bx,
    .hold(queue_full), .fire, .pending(l1a_pending), .l1accept
  );

  logic [EVID_W-1:0] evid;
  event_counter u_evc (
    .clk, .rst, .l1a(fire), .evcnt_reset(evcnt_res), .evid
  );

  // Data buses
  bcnt_sequencer u_bcnt (
    .clk, .rst, .fire, .bcid, .evid, .bcnt, .bcnt_str, .evcnt_lstr, .evcnt_hstr
  );

  logic [1:0] sa;
  dout_sequencer #(.DELAY(DOUT_DELAY), .DEPTH(QUEUE_DEPTH)) u_dout (
    .clk, .rst, .fire, .evid, .trigger_type, .dout, .dout_str,
    .sub_addr(sa), .full(queue_full)
  );

  assign sub_addr = {6'b000000, sa};
  assign dq       = 4'h0;

endmodule
