// ext_pulse_shaper: turns an asynchronous Lemo input into one clock pulse.
//
// An external signal (L1A, a reset broadcast) may be of any width, longer
// or much shorter than a clock period, and has no fixed phase to the
// emulator clock. A catch flop, clocked by the input's own rising edge,
// remembers that an edge came, so even a pulse of a few ns is not lost.
// The caught flag goes through a two-flop synchroniser; once it is seen
// there, it clears the catch flop, and the output is high for exactly one
// clock (25 ns at 40.08 MHz) per input edge, whatever the input width.
// A new input edge within about two clocks of the previous one is merged
// with it.
//
// Timing: the output is high during the clock period that follows the
// second clock edge after the input rises; a register clocked by the next
// edge shows the pulse 50 to 75 ns after the input edge. The emulator
// measures about 53 ns from external L1A input to L1Accept output, which
// this path reproduces.
//
// Taken from the original emulator design: a fixed 25 ns output for inputs longer or
// shorter than 25 ns. Own choices: the edge-clocked catch flop, the
// synchroniser depth, and triggering on the rising edge.
module ext_pulse_shaper (
  input  logic clk,
  input  logic rst,        // synchronous, active high
  input  logic async_in,   // Lemo input, asynchronous to clk
  output logic pulse       // one clock per rising edge of async_in
);

  logic meta_q, sync_q, prev_q, clr;

  // Set by the input edge, cleared once the clock domain has seen it. It
  // powers up clear (FPGA configuration value): its clear is an edge in
  // simulation, so a flag that started set while clr was already high
  // would otherwise never clear.
  logic catch_q = 1'b0;
  assign clr = rst || sync_q;

  always_ff @(posedge async_in or posedge clr) begin
    if (clr) catch_q <= 1'b0;
    else     catch_q <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      meta_q <= 1'b0;
      sync_q <= 1'b0;
      prev_q <= 1'b0;
    end else begin
      meta_q <= catch_q;
      sync_q <= meta_q;
      prev_q <= sync_q;
    end
  end

  assign pulse = sync_q & ~prev_q;

endmodule
