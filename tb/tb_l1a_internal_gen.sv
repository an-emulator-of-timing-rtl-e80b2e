// tb_l1a_internal_gen: checks the seven internal trigger modes.
//
// The generator is fed the real LHC bunch pattern from bx_generator.
// Random modes: measured mean rate against the nominal one within
// statistical limits (100 kHz, 10 kHz, 1 kHz), the Poisson property that
// about 1/e of the intervals exceed the mean, no request in an empty
// bunch, and for the slow modes the per-bunch probability against an
// independent real-number computation. Regular modes: every interval is
// exactly 534 clocks (75 kHz) or 40 080 000 clocks (1 Hz). Off mode: no
// requests.
module tb_l1a_internal_gen;
  import ttc_emu_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic rst;
  l1a_mode_e mode;
  logic bx, req, orbit_start;
  logic [BCID_W-1:0] bcid;
  int checks = 0, failures = 0;

  always #12.475 clk = ~clk;

  bx_generator       u_bx (.clk, .rst, .bcnt_reset(1'b0), .bcid, .bx, .orbit_start);
  l1a_internal_gen   dut  (.clk, .rst, .mode, .bx, .req);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (120_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // request statistics
  longint n_req, n_cyc, last_t, n_long, n_iv, bad_iv, in_empty;
  longint mean_clk;
  always @(posedge clk) begin
    n_cyc <= n_cyc + 1;
    if (!rst && req) begin
      if (!bx) in_empty <= in_empty + 1;
      if (last_t >= 0) begin
        n_iv <= n_iv + 1;
        if (n_cyc - last_t > mean_clk) n_long <= n_long + 1;
        if (mean_clk > 0 && n_cyc - last_t != mean_clk) bad_iv <= bad_iv + 1;
      end
      last_t <= n_cyc;
      n_req <= n_req + 1;
    end
  end

  task automatic run(input l1a_mode_e m, input longint cycles, input longint mean);
    @(negedge clk);
    mode = m;
    @(negedge clk);
    n_req = 0; n_long = 0; n_iv = 0; bad_iv = 0; in_empty = 0; last_t = -1;
    mean_clk = mean;
    repeat (cycles) @(negedge clk);
  endtask

  real fexp, got;
  real p_exact;
  initial begin
    n_cyc = 0;
    rst = 1'b1; mode = L1A_OFF;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    // random modes: rate = n / (cycles / 40.08 MHz)
    run(L1A_RND_100K, 2_000_000, 400);
    fexp = 100_000.0 * 2_000_000 / 40.08e6;
    check(n_req > fexp * 0.95 && n_req < fexp * 1.05,
          $sformatf("100 kHz random: %0d triggers, expected %0.0f", n_req, fexp));
    got = real'(n_long) / real'(n_iv);
    check(got > 0.33 && got < 0.40,
          $sformatf("100 kHz random: %0.3f of intervals above mean, expected 0.368", got));
    check(in_empty == 0, "random trigger in an empty bunch");

    mean_clk = 0;
    run(L1A_RND_10K, 4_000_000, 0);
    fexp = 10_000.0 * 4_000_000 / 40.08e6;
    check(n_req > fexp * 0.88 && n_req < fexp * 1.12,
          $sformatf("10 kHz random: %0d triggers, expected %0.0f", n_req, fexp));

    run(L1A_RND_1K, 8_000_000, 0);
    fexp = 1_000.0 * 8_000_000 / 40.08e6;
    check(n_req > fexp * 0.75 && n_req < fexp * 1.25,
          $sformatf("1 kHz random: %0d triggers, expected %0.0f", n_req, fexp));
    check(in_empty == 0, "random trigger in an empty bunch");

    // slow random modes: probability per filled bunch
    p_exact = 100.0 / (40.08e6 * 2808.0 / 3564.0);
    got = real'(dut.THR_100) / 4294967296.0;
    check(got > p_exact * 0.99 && got < p_exact * 1.01,
          $sformatf("100 Hz probability %g, expected %g", got, p_exact));
    p_exact = 1.0 / (40.08e6 * 2808.0 / 3564.0);
    got = real'(dut.THR_1) / 4294967296.0;
    check(got > p_exact * 0.99 && got < p_exact * 1.01,
          $sformatf("1 Hz probability %g, expected %g", got, p_exact));
    run(L1A_RND_100, 4_000_000, 0);
    check(n_req >= 2 && n_req <= 25, $sformatf("100 Hz random: %0d triggers in 0.1 s", n_req));

    // regular 75 kHz: 534 clocks
    run(L1A_REG_75K, 534 * 100 + 10, 534);
    check(n_req == 100 || n_req == 101, $sformatf("75 kHz regular: %0d triggers", n_req));
    check(bad_iv == 0 && n_iv > 90, $sformatf("75 kHz regular: %0d wrong intervals", bad_iv));

    // regular 1 Hz: 40 080 000 clocks
    run(L1A_REG_1, 2 * 40_080_000 + 10, 40_080_000);
    check(n_req == 2, $sformatf("1 Hz regular: %0d triggers in 2 s", n_req));
    check(bad_iv == 0 && n_iv == 1, "1 Hz regular interval");

    // off
    run(L1A_OFF, 100_000, 0);
    check(n_req == 0, "triggers in off mode");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
