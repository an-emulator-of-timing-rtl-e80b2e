// tb_bcnt_sequencer: checks the BCnt<11:0> loading sequence.
//
// Random L1As, 4 to 12 clocks apart, each with a random bunch number and
// event number. In the clock after fire the bus must carry the BCID with
// BCntStr, then EVID<11:0> with EvCntLStr, then EVID<23:12> with EvCntHStr,
// one strobe at a time; between sequences the strobes stay low.
module tb_bcnt_sequencer;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic rst, fire;
  logic [11:0] bcid, bcnt;
  logic [23:0] evid;
  logic bcnt_str, evcnt_lstr, evcnt_hstr;
  int checks = 0, failures = 0;

  always #12.475 clk = ~clk;

  bcnt_sequencer dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: t=%0t %s", $time, what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [11:0] b;
  logic [23:0] e;
  int gap;
  initial begin
    rst = 1; fire = 0; bcid = 0; evid = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2000) begin
      b = 12'($urandom); e = 24'($urandom);
      fire = 1; bcid = b; evid = e;
      @(negedge clk);
      fire = 0; bcid = 12'($urandom); evid = 24'($urandom);  // inputs change after capture
      check(bcnt == b && bcnt_str && !evcnt_lstr && !evcnt_hstr, "word 0: BCID with BCntStr");
      @(negedge clk);
      check(bcnt == e[11:0] && !bcnt_str && evcnt_lstr && !evcnt_hstr, "word 1: EVID<11:0> with EvCntLStr");
      @(negedge clk);
      check(bcnt == e[23:12] && !bcnt_str && !evcnt_lstr && evcnt_hstr, "word 2: EVID<23:12> with EvCntHStr");
      gap = $urandom_range(1, 9);
      repeat (gap) begin
        @(negedge clk);
        check(!bcnt_str && !evcnt_lstr && !evcnt_hstr && bcnt == e[23:12], "idle bus holds, strobes low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
