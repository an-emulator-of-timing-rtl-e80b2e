// tb_event_counter: checks the 24-bit event number.
//
// Random L1A and EvCntRes pulses against a reference count; a preload by
// 2^24 - 2 L1As is avoided by a directed wrap test using many L1As in a
// row (every clock) until the counter passes 0xFFFFFF.
module tb_event_counter;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic rst, l1a, evcnt_reset;
  logic [23:0] evid;
  int checks = 0, failures = 0;
  int unsigned ref_cnt;

  always #12.475 clk = ~clk;

  event_counter dut (.*);

  initial begin
    repeat (17_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string what);
    checks++;
    if (evid !== 24'(ref_cnt)) begin
      failures++;
      $display("FAIL: %s: evid %0d expected %0d", what, evid, ref_cnt & 24'hFFFFFF);
    end
  endtask

  initial begin
    rst = 1; l1a = 0; evcnt_reset = 0; ref_cnt = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    cmp("after reset");
    repeat (5000) begin
      l1a = $urandom_range(0, 2) == 0;
      evcnt_reset = $urandom_range(0, 200) == 0;
      @(negedge clk);
      if (evcnt_reset) ref_cnt = 0;
      else if (l1a) ref_cnt++;
      cmp("random");
    end
    // wrap-around at 24 bits
    l1a = 1; evcnt_reset = 0;
    ref_cnt = 0;
    @(negedge clk); evcnt_reset = 1; @(negedge clk); evcnt_reset = 0;
    repeat (24'hFFFFFF) @(negedge clk);
    ref_cnt = 24'hFFFFFF;
    cmp("at 2^24-1");
    @(negedge clk);
    ref_cnt = 0;
    cmp("wrap to 0");
    l1a = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
