// l1a_internal_gen: internal Level-1 Accept requests of the TTC emulator.
//
// Seven modes, chosen by a 3-bit DIP-switch code (ttc_emu_pkg::l1a_mode_e):
// random triggers with mean rates of 100 kHz, 10 kHz, 1 kHz, 100 Hz and
// 1 Hz, and regular triggers at 75 kHz and 1 Hz. Code 7 turns the
// generator off.
//
// Random mode: a xorshift32 generator produces a new 32-bit word every
// clock. In every filled bunch (bx high) the word is compared with a
// per-mode threshold; a word below it is a trigger. The trials are
// independent with a fixed probability, so the intervals between
// triggers are geometrically distributed, the discrete form of the
// exponential (Poisson-process) intervals of a random trigger. The
// threshold corrects for the empty bunch slots so that the mean rate is
// the nominal one.
//
// Regular mode: a counter of clocks issues a request every CLK_HZ/rate
// clocks (534 clocks for 75 kHz, 40 080 000 for 1 Hz). The request is not
// tied to a filled bunch here; l1a_controller holds it until one comes.
//
// Interface: req is a one-clock pulse. The regular counter restarts when
// the mode changes. Output is combinational from registers and bx.
//
// Taken from the original emulator design: the seven modes and rates, Poisson intervals
// for the random modes. Own choices: the random-number generator, the
// threshold method and the mode encoding.
module l1a_internal_gen
  import ttc_emu_pkg::*;
#(
  parameter int unsigned CLK_FREQ = CLK_HZ,
  parameter logic [31:0] SEED     = 32'h2545_F491
) (
  input  logic      clk,
  input  logic      rst,     // synchronous, active high
  input  l1a_mode_e mode,
  input  logic      bx,      // current bunch slot is filled
  output logic      req      // one-clock trigger request
);

  localparam logic [31:0] THR_100K = rnd_threshold(100_000, CLK_FREQ);
  localparam logic [31:0] THR_10K  = rnd_threshold(10_000,  CLK_FREQ);
  localparam logic [31:0] THR_1K   = rnd_threshold(1_000,   CLK_FREQ);
  localparam logic [31:0] THR_100  = rnd_threshold(100,     CLK_FREQ);
  localparam logic [31:0] THR_1    = rnd_threshold(1,       CLK_FREQ);
  localparam int unsigned PER_75K  = reg_period(75_000, CLK_FREQ);
  localparam int unsigned PER_1    = reg_period(1,      CLK_FREQ);
  localparam int unsigned CNT_W    = $clog2(PER_1 + 1);

  // xorshift32 random word
  logic [31:0] rnd_q, rnd_d;
  always_comb begin
    rnd_d = rnd_q ^ (rnd_q << 13);
    rnd_d = rnd_d ^ (rnd_d >> 17);
    rnd_d = rnd_d ^ (rnd_d << 5);
  end

  always_ff @(posedge clk) begin
    if (rst) rnd_q <= (SEED == '0) ? 32'h1 : SEED;
    else     rnd_q <= rnd_d;
  end

  logic [31:0] thr;
  logic        is_random;
  always_comb begin
    is_random = 1'b1;
    unique case (mode)
      L1A_RND_100K: thr = THR_100K;
      L1A_RND_10K:  thr = THR_10K;
      L1A_RND_1K:   thr = THR_1K;
      L1A_RND_100:  thr = THR_100;
      L1A_RND_1:    thr = THR_1;
      default: begin
        thr       = '0;
        is_random = 1'b0;
      end
    endcase
  end

  // Regular-mode clock counter
  logic [CNT_W-1:0] per_m1;
  logic             is_regular;
  always_comb begin
    is_regular = 1'b1;
    unique case (mode)
      L1A_REG_75K: per_m1 = CNT_W'(PER_75K - 1);
      L1A_REG_1:   per_m1 = CNT_W'(PER_1 - 1);
      default: begin
        per_m1     = '0;
        is_regular = 1'b0;
      end
    endcase
  end

  logic [CNT_W-1:0] cnt_q;
  l1a_mode_e        mode_q;
  logic             reg_hit;

  assign reg_hit = is_regular && (cnt_q == per_m1);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q  <= '0;
      mode_q <= L1A_OFF;
    end else begin
      mode_q <= mode;
      if (mode != mode_q || !is_regular || reg_hit) cnt_q <= '0;
      else                                          cnt_q <= cnt_q + 1'b1;
    end
  end

  assign req = (is_random && bx && (rnd_q < thr)) || (reg_hit && mode == mode_q);

endmodule
