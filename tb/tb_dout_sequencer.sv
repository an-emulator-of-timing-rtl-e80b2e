// tb_dout_sequencer: checks the delayed trigger-type / event-counter
// bytes on Dout.
//
// A reference queue in the testbench records each L1A's clock, trigger
// type and event number. Event i must start in clock
//   S_i = max(F_i + 176, S_(i-1) + 4)
// (F_i its fire clock) and show, in clocks S_i+1 .. S_i+4, the bytes
// trigger type, EVID<23:16>, EVID<15:8>, EVID<7:0> with SubAddr 00, 01,
// 10, 11 and DoutStr; DoutStr is low in every other clock. Phase 1 sends
// sparse L1As (the nominal 4.4 us latency, checked as 176 clocks from
// L1Accept); phase 2 sends L1As every 4 clocks, the fastest the controller
// allows; phase 3 sends one every clock until the queue reports full,
// which must happen with exactly 64 events waiting.
module tb_dout_sequencer;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic rst, fire;
  logic [23:0] evid;
  logic [7:0] trigger_type, dout;
  logic dout_str, full;
  logic [1:0] sub_addr;
  int checks = 0, failures = 0;

  always #12.475 clk = ~clk;

  dout_sequencer dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected bytes, indexed by clock
  typedef struct { logic [7:0] d; logic [1:0] sa; } exp_t;
  exp_t exp_at [longint];
  longint cyc = 0, last_start = -100;
  int outstanding = 0;
  int n_bytes = 0, n_full = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      // compare what the registered outputs show in this clock
      checks++;
      if (exp_at.exists(cyc)) begin
        if (!dout_str || dout !== exp_at[cyc].d || sub_addr !== exp_at[cyc].sa) begin
          failures++;
          $display("FAIL: clock %0d: str %b dout %h sa %b, expected %h sa %b",
                   cyc, dout_str, dout, sub_addr, exp_at[cyc].d, exp_at[cyc].sa);
        end
        n_bytes++;
        if (exp_at[cyc].sa == 2'b11) outstanding--;
        exp_at.delete(cyc);
      end else if (dout_str) begin
        failures++;
        $display("FAIL: clock %0d: unexpected DoutStr", cyc);
      end
      if (fire && !full) begin
        longint s;
        s = cyc + 176;
        if (s < last_start + 4) s = last_start + 4;
        last_start = s;
        exp_at[s + 1] = '{trigger_type, 2'b00};
        exp_at[s + 2] = '{evid[23:16], 2'b01};
        exp_at[s + 3] = '{evid[15:8],  2'b10};
        exp_at[s + 4] = '{evid[7:0],   2'b11};
        outstanding++;
      end
    end
  end

  task automatic l1a();
    fire = 1; evid = 24'($urandom); trigger_type = 8'($urandom);
    @(negedge clk);
    fire = 0;
  endtask

  initial begin
    rst = 1; fire = 0; evid = 0; trigger_type = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // phase 1: sparse
    repeat (20) begin
      l1a();
      repeat ($urandom_range(3, 400)) @(negedge clk);
    end
    repeat (400) @(negedge clk);
    // phase 2: every 4 clocks
    repeat (300) begin
      l1a();
      repeat (3) @(negedge clk);
    end
    repeat (400) @(negedge clk);
    // phase 3: every clock until full
    while (!full) l1a();
    checks++;
    if (outstanding != 64) begin
      failures++;
      $display("FAIL: full with %0d events waiting, expected 64", outstanding);
    end
    n_full++;
    repeat (2000) @(negedge clk);
    checks++;
    if (outstanding != 0 || exp_at.size() != 0 || n_bytes != 4 * (20 + 300 + 64)) begin
      failures++;
      $display("FAIL: %0d events not sent, %0d bytes seen", outstanding, n_bytes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
