// tb_ext_pulse_shaper: checks the Lemo input synchroniser and shaper.
//
// Drives input pulses of many widths (from 2 ns, far shorter than a
// clock, to 350 ns, as in the external L1A measurement) at random phases
// to the clock. Each rising
// edge must give exactly one output pulse, one clock long, and the pulse
// must be seen by a register two clock edges after the first edge that
// samples the high input: 50 to 75 ns after the input edge.
module tb_ext_pulse_shaper;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic rst, async_in, pulse;
  int checks = 0, failures = 0;

  always #12.475 clk = ~clk;

  ext_pulse_shaper dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count output pulses and their widths as a register would see them
  int n_out = 0, width = 0;
  realtime t_in, t_out;
  logic pulse_q = 1'b0;
  always @(posedge clk) begin
    pulse_q <= pulse;
    if (pulse) width++;
  end
  always @(posedge pulse_q) begin
    n_out++;
    t_out = $realtime;
  end

  initial begin
    int w_ns;
    rst = 1'b0; async_in = 1'b0;
    #5ns rst = 1'b1;                 // an edge, so the catch flop clears
    repeat (4) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      #($urandom_range(0, 24950) * 1ps);
      w_ns = (i == 0) ? 350 : (i % 3 == 1) ? int'($urandom_range(2, 20)) : int'($urandom_range(30, 400));
      n_out = 0; width = 0;
      async_in = 1'b1; t_in = $realtime;
      #(w_ns * 1ns);
      async_in = 1'b0;
      repeat (6) @(posedge clk);
      checks++;
      if (n_out != 1 || width != 1) begin
        failures++;
        $display("FAIL: width %0d ns in -> %0d pulses, %0d clocks", w_ns, n_out, width);
      end
      checks++;
      if (t_out - t_in < 49.9 || t_out - t_in > 75.0) begin
        failures++;
        $display("FAIL: latency %0.2f ns (pulse %0d, width %0d ns, in at %0.3f)", t_out - t_in, i, w_ns, t_in);
      end
    end
    // a high input held forever gives only one pulse
    n_out = 0; width = 0;
    async_in = 1'b1;
    repeat (50) @(posedge clk);
    checks++;
    if (n_out != 1 || width != 1) begin
      failures++;
      $display("FAIL: held input gave %0d pulses", n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
