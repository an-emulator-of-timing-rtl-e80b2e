// tb_l1a_controller: checks source selection, BX coincidence, dead time.
//
// Directed cases first: an immediate L1A, one held until the next filled
// bunch, one held by the dead time (4 clocks), one held by the hold input,
// and the source jumper ignoring the unselected source. Then 20 000 random
// clocks compared, clock by clock, with a reference model written from the
// rules: a request waits; it is issued in the first clock with a filled
// bunch, no hold and at least 4 clocks since the last L1A; l1accept
// follows one clock later. No L1A may ever be issued in an empty bunch.
module tb_l1a_controller;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic rst, src_ext, int_req, ext_req, bx, hold;
  logic fire, pending, l1accept;
  int checks = 0, failures = 0;

  always #12.475 clk = ~clk;

  l1a_controller dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  bit m_pend = 0, m_fire_d = 0;
  int m_since = 100;
  bit m_fire;

  always_comb begin
    m_fire = ((src_ext ? ext_req : int_req) || m_pend) && bx && !hold && m_since >= 4;
  end

  bit model_on = 0;
  always @(posedge clk) begin
    if (model_on) begin
      checks++;
      if (fire !== m_fire || l1accept !== m_fire_d) begin
        failures++;
        $display("FAIL: t=%0t fire %b/%b l1accept %b/%b", $time, fire, m_fire, l1accept, m_fire_d);
      end
      if (fire && !bx) begin
        failures++;
        $display("FAIL: L1A in empty bunch");
      end
    end
    m_pend   <= ((src_ext ? ext_req : int_req) || m_pend) && !m_fire;
    m_fire_d <= m_fire;
    m_since  <= m_fire ? 1 : (m_since < 100 ? m_since + 1 : 100);
  end

  task automatic idle(input int n);
    int_req = 0; ext_req = 0;
    repeat (n) @(negedge clk);
  endtask

  int t0, fire_at;
  initial begin
    rst = 1; src_ext = 0; int_req = 0; ext_req = 0; bx = 1; hold = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    idle(10);
    // immediate L1A
    int_req = 1; #1;
    check(fire == 1, "immediate fire in filled bunch");
    @(negedge clk); int_req = 0;
    check(l1accept == 1, "L1Accept one clock after fire");
    idle(10);
    // empty bunch: wait for filled one
    bx = 0; int_req = 1;
    @(negedge clk); int_req = 0;
    repeat (5) begin
      check(fire == 0 && pending == 1, "held in empty bunch");
      @(negedge clk);
    end
    bx = 1; #1;
    check(fire == 1, "fires at first filled bunch");
    idle(10);
    // dead time: second request one clock after the first
    int_req = 1; @(negedge clk);
    int_req = 1; #1;
    check(fire == 0, "second L1A blocked by dead time");
    fire_at = 0;
    for (int i = 1; i < 8; i++) begin
      @(negedge clk); int_req = 0; #1;
      if (fire && fire_at == 0) fire_at = i + 1;
    end
    check(fire_at == 4, $sformatf("second L1A %0d clocks after first, expected 4", fire_at));
    idle(10);
    // hold
    hold = 1; int_req = 1; @(negedge clk); int_req = 0;
    repeat (3) begin check(fire == 0, "held by hold"); @(negedge clk); end
    hold = 0; #1;
    check(fire == 1, "fires when hold drops");
    idle(10);
    // source selection
    src_ext = 1; int_req = 1; #1;
    check(fire == 0, "internal request ignored in external mode");
    @(negedge clk); int_req = 0; ext_req = 1; #1;
    check(fire == 1, "external request fires");
    idle(10);
    src_ext = 0; ext_req = 1; #1;
    check(fire == 0, "external request ignored in internal mode");
    idle(10);

    // random run against the model
    model_on = 1;
    repeat (20000) begin
      src_ext = ($urandom_range(0, 999) == 0) ? ~src_ext : src_ext;
      int_req = ($urandom_range(0, 9) == 0);
      ext_req = ($urandom_range(0, 9) == 0);
      bx      = ($urandom_range(0, 4) != 0);
      hold    = ($urandom_range(0, 19) == 0);
      @(negedge clk);
    end
    model_on = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
