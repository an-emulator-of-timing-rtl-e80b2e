// ttc_emu_pkg: constants and types shared by the TTC emulator firmware.
//
// The emulator runs on one clock, the deskewed 40.08 MHz LHC clock
// (Clock40Des1). Everything that depends on time is counted in periods of
// that clock, so a slower or faster external clock scales every rate and
// delay with it, as on the real board.
//
// Taken from the original emulator design: the 40.08 MHz clock, 12-bit
// BCID, 24-bit event number, 8-bit trigger type, the seven internal L1A
// modes and the 4.4 us delay of the Dout sequence. The LHC orbit of 3564
// bunch slots and its 2808-bunch filling scheme are the nominal LHC figures;
// the mode encoding, the random-number threshold formula and the L1A dead
// time are this design's own choices.
package ttc_emu_pkg;

  // Clock and bunch structure
  localparam int unsigned CLK_HZ         = 40_080_000;  // Clock40Des1 frequency
  localparam int unsigned BX_PER_ORBIT   = 3564;        // bunch slots per LHC orbit
  localparam int unsigned FILLED_BUNCHES = 2808;        // filled slots per orbit (39 x 72)
  localparam int unsigned BCID_W         = 12;
  localparam int unsigned EVID_W         = 24;
  localparam int unsigned TTYPE_W        = 8;

  // Dout (B-channel) sequence: 4.4 us after L1A = 176.35 clocks
  localparam int unsigned DOUT_DELAY_CLK = 176;

  // Internal L1A generation modes (DIP switch code)
  typedef enum logic [2:0] {
    L1A_RND_100K = 3'd0,   // random, 100 kHz mean
    L1A_RND_10K  = 3'd1,   // random, 10 kHz mean
    L1A_RND_1K   = 3'd2,   // random, 1 kHz mean
    L1A_RND_100  = 3'd3,   // random, 100 Hz mean
    L1A_RND_1    = 3'd4,   // random, 1 Hz mean
    L1A_REG_75K  = 3'd5,   // regular, 75 kHz
    L1A_REG_1    = 3'd6,   // regular, 1 Hz
    L1A_OFF      = 3'd7    // no internal triggers
  } l1a_mode_e;

  // Byte selector on SubAddr<1:0> during the Dout sequence
  typedef enum logic [1:0] {
    SA_TTYPE  = 2'b00,     // trigger type
    SA_EV_HI  = 2'b01,     // event/orbit counter bits 23:16
    SA_EV_MID = 2'b10,     // bits 15:8
    SA_EV_LO  = 2'b11      // bits 7:0
  } subaddr_e;

  // Threshold for a 32-bit uniform random word, compared once per filled
  // bunch, that gives a mean trigger rate of rate_hz:
  //   thr = rate_hz * 2^32 * BX_PER_ORBIT / (clk_hz * FILLED_BUNCHES)
  function automatic logic [31:0] rnd_threshold(input int unsigned rate_hz,
                                                input int unsigned clk_hz);
    longint unsigned num;
    num = (longint'(rate_hz) << 32) * BX_PER_ORBIT;
    return 32'(num / (longint'(clk_hz) * FILLED_BUNCHES));
  endfunction

  // Period, in clocks, of a regular trigger of rate_hz
  function automatic int unsigned reg_period(input int unsigned rate_hz,
                                             input int unsigned clk_hz);
    return clk_hz / rate_hz;
  endfunction

  // Nominal LHC 25 ns filling scheme: 39 trains of 72 bunches in 12 groups
  // of 2,3,4,3,3,4,3,3,4,3,3,4 trains. 8 empty slots between trains of a
  // group, 38 between groups, 39 after groups 3, 6 and 9, and a 119-slot
  // abort gap at the end of the orbit. Slot 0 is the first bunch of train 1.
  function automatic logic [BX_PER_ORBIT-1:0] lhc_fill_pattern();
    logic [BX_PER_ORBIT-1:0] pat;
    int unsigned pos;
    int unsigned ntr;
    pat = '0;
    pos = 0;
    for (int g = 0; g < 12; g++) begin
      ntr = (g == 0) ? 2 : ((g % 3 == 2) ? 4 : 3);
      for (int t = 0; t < int'(ntr); t++) begin
        for (int b = 0; b < 72; b++) begin
          pat[pos] = 1'b1;
          pos++;
        end
        if (t != int'(ntr) - 1) pos += 8;
      end
      if (g == 11)           pos += 119;
      else if (g % 3 == 2)   pos += 39;
      else                   pos += 38;
    end
    return pat;
  endfunction

endpackage
