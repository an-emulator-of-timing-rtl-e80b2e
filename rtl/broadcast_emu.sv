// broadcast_emu: broadcast command outputs of the TTC emulator.
//
// A TTCrx decodes 8-bit broadcast commands: bit 0 becomes the bunch-
// counter reset pin BCntRes, bit 1 the event-counter reset EvCntRes,
// bits 5:2 appear on Brcst<5:2> with strobe BrcstStr1 and bits 7:6 on
// Brcst<7:6> with strobe BrcstStr2. The emulator makes bits 1:0 and 7:5
// from external Lemo inputs: one input each for BCntRes, EvCntRes and
// Brcst<6>, and one input, RST, that sets Brcst<5> and Brcst<7> together
// (the board had no room for separate system and DCS reset connectors).
// Brcst<4:2> are not emulated and stay 0. Brcst<7:6> are timed by the same
// clock as Brcst<5:2>, since the emulator has only Clock40Des1.
//
// Interface: the inputs are one-clock pulses from ext_pulse_shaper. All
// outputs are registered one clock later. A Brcst bit is high only in the
// clock its strobe is high; simultaneous inputs make one combined
// broadcast.
//
// Taken from the original emulator design: which bits are emulated, the shared RST
// input, one clock for all Brcst bits. Own choice: Brcst bits are 0 outside
// their strobe clock.
module broadcast_emu (
  input  logic       clk,
  input  logic       rst,          // synchronous, active high
  input  logic       bcr_in,       // Lemo BCntRes pulse
  input  logic       ecr_in,       // Lemo EvCntRes pulse
  input  logic       rst_in,       // Lemo RST pulse -> Brcst<5> and Brcst<7>
  input  logic       b6_in,        // Lemo Brcst<6> pulse
  output logic       bcnt_res,     // BCntRes
  output logic       evcnt_res,    // EvCntRes
  output logic [7:2] brcst,        // Brcst<7:2>
  output logic       brcst_str1,   // strobe of Brcst<5:2>
  output logic       brcst_str2    // strobe of Brcst<7:6>
);

  always_ff @(posedge clk) begin
    if (rst) begin
      bcnt_res   <= 1'b0;
      evcnt_res  <= 1'b0;
      brcst      <= '0;
      brcst_str1 <= 1'b0;
      brcst_str2 <= 1'b0;
    end else begin
      bcnt_res   <= bcr_in;
      evcnt_res  <= ecr_in;
      brcst      <= {rst_in, b6_in, rst_in, 3'b000};
      brcst_str1 <= rst_in;
      brcst_str2 <= rst_in || b6_in;
    end
  end

endmodule
