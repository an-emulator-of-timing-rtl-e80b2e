// tb_bx_generator: checks the LHC bunch counter and filling pattern.
//
// Runs two full orbits and measures the filled/empty run lengths of the bx
// output, comparing them with the nominal 25 ns scheme: 39 trains of 72
// bunches, 27 gaps of 8, 8 gaps of 38, 3 of 39 and one 119-slot abort gap,
// slot 0 filled. Also checks the wrap at 3563, orbit_start, and that a
// bunch-counter reset pulse restarts the count at 0.
module tb_bx_generator;
  import ttc_emu_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic rst, bcnt_reset;
  logic [BCID_W-1:0] bcid;
  logic bx, orbit_start;
  int checks = 0, failures = 0;

  always #12.475 clk = ~clk;

  bx_generator dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int filled, runs72, gap8, gap38, gap39, gap119, other;
  int run_len;
  logic run_val;
  int expect_bcid;

  initial begin
    rst = 1'b1; bcnt_reset = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    check(bcid == 0 && orbit_start && bx, "starts at slot 0, filled");
    // one orbit: run-length census
    filled = 0; runs72 = 0; gap8 = 0; gap38 = 0; gap39 = 0; gap119 = 0; other = 0;
    run_len = 0; run_val = bx;
    expect_bcid = 0;
    for (int i = 0; i < 3564; i++) begin
      if (bcid != BCID_W'(expect_bcid)) begin
        check(0, $sformatf("bcid %0d expected %0d", bcid, expect_bcid));
      end
      if (bx) filled++;
      if (bx == run_val) run_len++;
      else begin
        if (run_val && run_len == 72) runs72++;
        else if (!run_val && run_len == 8) gap8++;
        else if (!run_val && run_len == 38) gap38++;
        else if (!run_val && run_len == 39) gap39++;
        else other++;
        run_val = bx; run_len = 1;
      end
      expect_bcid++;
      @(negedge clk);
    end
    // last run of the orbit must be the abort gap
    if (!run_val && run_len == 119) gap119++; else other++;
    check(bcid == 0 && orbit_start, "wraps to 0 after 3563");
    check(filled == 2808, $sformatf("filled bunches %0d", filled));
    check(runs72 == 39, $sformatf("trains of 72: %0d", runs72));
    check(gap8 == 27, $sformatf("gaps of 8: %0d", gap8));
    check(gap38 == 8, $sformatf("gaps of 38: %0d", gap38));
    check(gap39 == 3, $sformatf("gaps of 39: %0d", gap39));
    check(gap119 == 1, "abort gap of 119 at orbit end");
    check(other == 0, $sformatf("unexpected runs: %0d", other));
    // bunch-counter reset in mid orbit
    repeat (1000) @(negedge clk);
    check(bcid == 1000, $sformatf("bcid %0d before reset", bcid));
    bcnt_reset = 1'b1;
    @(negedge clk);
    bcnt_reset = 1'b0;
    check(bcid == 0, "bcid 0 after bunch-counter reset");
    repeat (5) @(negedge clk);
    check(bcid == 5, "counts on after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
