// tb_ttc_emulator_top: end-to-end test of the TTC emulator at its default
// parameters (40.08 MHz clock, 3564-slot orbit, 176-clock Dout delay).
//
// Pin-level checks, with models written here from the TTCrx conventions:
//  - every L1Accept comes with BCntStr and a BCID of a filled bunch
//    (filling scheme rebuilt here from run lengths), BCIDs advance with
//    time modulo 3564, event numbers count up from 0 and restart after
//    EvCntRes; EvCntLStr/EvCntHStr carry the event number in the next two
//    clocks;
//  - 176 clocks after each L1Accept (or 4 clocks after the previous
//    event's bytes), Dout carries trigger type, EVID<23:16>, <15:8>, <7:0>
//    with SubAddr 0..3 and DoutStr;
//  - an external L1A leaves 50-75 ns after its edge in a filled bunch, and
//    only at bunch 0 when sent inside the abort gap;
//  - Lemo RST / Brcst6 / BCR / ECR appear on their pins; BCR restarts the
//    bunch count; TTCReady rises after reset.
// Run sequence: 100 kHz random, mode switches through 10 kHz random and
// 75 kHz regular, 1 Hz regular for one full second, external L1As, then
// the broadcast inputs. Each mechanism is counted and must occur.
module tb_ttc_emulator_top;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic reset_b, l1a_src_ext;
  logic [2:0] l1a_mode;
  logic [7:0] trigger_type;
  logic lemo_l1a, lemo_bcr, lemo_ecr, lemo_rst, lemo_brcst6;
  logic l1accept, bcnt_str, evcnt_lstr, evcnt_hstr, bcnt_res, evcnt_res;
  logic [11:0] bcnt;
  logic [7:2] brcst;
  logic brcst_str1, brcst_str2, dout_str, ttc_ready;
  logic [7:0] sub_addr, dout;
  logic [3:0] dq;
  int checks = 0, failures = 0;

  always #12.475 clk = ~clk;

  ttc_emulator_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: t=%0t %s", $time, what);
    end
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- filling scheme from run lengths: (train length, gap after) ----
  bit filled [3564];
  initial begin
    int pos, ntr;
    int groups [12] = '{2,3,4,3,3,4,3,3,4,3,3,4};
    pos = 0;
    foreach (filled[i]) filled[i] = 0;
    for (int g = 0; g < 12; g++) begin
      ntr = groups[g];
      for (int t = 0; t < ntr; t++) begin
        for (int b = 0; b < 72; b++) filled[pos + b] = 1;
        pos += 72 + ((t < ntr - 1) ? 8 : 0);
      end
      pos += (g == 11) ? 119 : ((g == 2 || g == 5 || g == 8) ? 39 : 38);
    end
    if (pos != 3564) $display("FAIL: filling scheme model is %0d slots", pos);
  end

  // ---- pin monitor ----
  longint cyc = 0;
  int unsigned ev_model = 0;
  bit prev_evres = 0, prev_bcres = 0;
  longint last_l1a_t = -1;
  int last_bcid = -1;
  bit bcr_since_last = 0;
  int seq_step = 0;
  logic [23:0] seq_ev;
  int n_l1a = 0;

  typedef struct { logic [7:0] d; logic [1:0] sa; } exp_t;
  exp_t exp_at [longint];
  longint last_start = -100;
  int dout_events = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (reset_b && ttc_ready) begin
      // BCnt bus sequence
      if (seq_step == 1) begin
        check(evcnt_lstr && !bcnt_str && bcnt == seq_ev[11:0], "EVID<11:0> on BCnt");
        seq_step = 2;
      end else if (seq_step == 2) begin
        check(evcnt_hstr && !bcnt_str && bcnt == seq_ev[23:12], "EVID<23:12> on BCnt");
        seq_step = 0;
      end else begin
        check(!evcnt_lstr && !evcnt_hstr, "no stray event strobes");
      end
      check(l1accept == bcnt_str, "BCntStr with L1Accept");
      if (l1accept) begin
        n_l1a++;
        check(filled[bcnt], $sformatf("L1A in empty bunch %0d", bcnt));
        if (last_bcid >= 0 && !bcr_since_last)
          check(longint'(bcnt) == (last_bcid + (cyc - last_l1a_t)) % 3564,
                $sformatf("BCID %0d does not follow time", bcnt));
        last_bcid = bcnt; last_l1a_t = cyc; bcr_since_last = 0;
        seq_ev = 24'(ev_model);
        seq_step = 1;
        // expected Dout bytes
        begin
          longint s;
          s = cyc + 175;
          if (s < last_start + 4) s = last_start + 4;
          last_start = s;
          exp_at[s + 1] = '{trigger_type, 2'b00};
          exp_at[s + 2] = '{seq_ev[23:16], 2'b01};
          exp_at[s + 3] = '{seq_ev[15:8],  2'b10};
          exp_at[s + 4] = '{seq_ev[7:0],   2'b11};
        end
      end
      // event counter model: C(t+1) = evres(t) ? 0 : C(t) + fire(t)
      if (prev_evres) ev_model = 0;
      else if (l1accept) ev_model++;
      // (fire(t-1) is l1accept(t); evres applies one clock after the pin)
      prev_evres = evcnt_res;
      if (bcnt_res) bcr_since_last = 1;
      // Dout bus
      if (exp_at.exists(cyc)) begin
        check(dout_str && dout == exp_at[cyc].d && sub_addr == {6'b0, exp_at[cyc].sa},
              $sformatf("Dout byte %h sa %0d, got %h sa %0d str %b",
                        exp_at[cyc].d, exp_at[cyc].sa, dout, sub_addr, dout_str));
        if (exp_at[cyc].sa == 2'b11) dout_events++;
        exp_at.delete(cyc);
      end else begin
        check(!dout_str, "unexpected DoutStr");
      end
      check(dq == 0 && sub_addr[7:2] == 0, "fixed pins");
    end
  end

  // ---- mechanism counters (internal signals, for coverage only) ----
  int m_rand = 0, m_reg = 0, m_ext = 0, m_wait_empty = 0, m_dead = 0,
      m_queue = 0, m_ecr = 0, m_bcr = 0, m_rst = 0, m_b6 = 0, m_mode = 0;
  logic [2:0] mode_prev = 3'd7;
  always @(posedge clk) if (reset_b && ttc_ready) begin
    if (dut.fire && !l1a_src_ext && l1a_mode <= 3'd4) m_rand++;
    if (dut.fire && !l1a_src_ext && (l1a_mode == 3'd5 || l1a_mode == 3'd6)) m_reg++;
    if (dut.fire && l1a_src_ext) m_ext++;
    if (dut.u_ctl.pending && !dut.bx) m_wait_empty++;
    if (dut.u_ctl.want && dut.bx && dut.u_ctl.dead_q != 0) m_dead++;
    if (dut.fire && !dut.u_dout.empty) m_queue++;
    if (evcnt_res) m_ecr++;
    if (bcnt_res) begin
      m_bcr++;
    end
    if (prev_bcres) check(dut.bcid == 0, "bunch count restarts after BcntRes");
    prev_bcres = bcnt_res;
    if (brcst_str1 && brcst[5] && brcst[7]) m_rst++;
    if (brcst_str2 && brcst[6]) m_b6++;
    if (l1a_mode != mode_prev) m_mode++;
    mode_prev = l1a_mode;
  end

  // ---- stimulus ----
  longint n0, t0;
  realtime t_in, t_out;
  task automatic ext_pulse(input int width_ns);
    lemo_l1a = 1; t_in = $realtime;
    #(width_ns * 1ns);
    lemo_l1a = 0;
  endtask

  task automatic lemo(ref logic sig);
    @(negedge clk); #3ns;
    sig = 1; #100ns; sig = 0;
    repeat (10) @(negedge clk);
  endtask

  initial begin
    reset_b = 1; #5ns reset_b = 0;   // a reset edge clears the input catch flops
    l1a_src_ext = 0; l1a_mode = 3'd7; trigger_type = 8'h5A;
    lemo_l1a = 0; lemo_bcr = 0; lemo_ecr = 0; lemo_rst = 0; lemo_brcst6 = 0;
    #200ns;
    check(!ttc_ready, "TTCReady low in reset");
    @(negedge clk) reset_b = 1;
    repeat (4) @(negedge clk);
    check(ttc_ready, "TTCReady high after reset");

    // 100 kHz random: about 10 us mean interval
    l1a_mode = 3'd0;
    n0 = n_l1a;
    repeat (400_800) @(negedge clk);     // 10 ms
    check(n_l1a - n0 > 900 && n_l1a - n0 < 1100,
          $sformatf("100 kHz random gave %0d L1As in 10 ms", n_l1a - n0));
    trigger_type = 8'hC3;
    l1a_mode = 3'd1;                     // 10 kHz random
    n0 = n_l1a;
    repeat (400_800) @(negedge clk);
    check(n_l1a - n0 > 60 && n_l1a - n0 < 140,
          $sformatf("10 kHz random gave %0d L1As in 10 ms", n_l1a - n0));
    l1a_mode = 3'd5;                     // 75 kHz regular
    n0 = n_l1a;
    repeat (400_800) @(negedge clk);
    check(n_l1a - n0 >= 749 && n_l1a - n0 <= 751,
          $sformatf("75 kHz regular gave %0d L1As in 10 ms", n_l1a - n0));
    l1a_mode = 3'd6;                     // 1 Hz regular, one full second
    n0 = n_l1a;
    repeat (40_080_000 + 500) @(negedge clk);
    check(n_l1a - n0 == 1, $sformatf("1 Hz regular gave %0d L1As in 1 s", n_l1a - n0));
    l1a_mode = 3'd7;
    repeat (300) @(negedge clk);

    // external L1A, 350 ns wide, in filled bunches
    l1a_src_ext = 1;
    repeat (20) begin
      wait (dut.bcid == 12'd100);
      #($urandom_range(0, 24000) * 1ps);
      fork
        ext_pulse(350);
        begin
          @(posedge l1accept);
          t_out = $realtime;
        end
      join
      check(t_out - t_in >= 49.9 && t_out - t_in <= 75.0,
            $sformatf("external L1A latency %0.1f ns", t_out - t_in));
      repeat (400) @(negedge clk);
    end
    // external L1A inside the abort gap: waits for bunch 0
    wait (dut.bcid == 12'd3460);
    @(negedge clk);
    ext_pulse(30);
    @(posedge l1accept);
    check(last_bcid == 0 || bcnt == 0, "L1A from abort gap issued at bunch 0");
    repeat (400) @(negedge clk);

    // broadcasts
    lemo(lemo_rst);
    lemo(lemo_brcst6);
    lemo(lemo_ecr);
    ext_pulse(50);                        // event 0 after reset
    repeat (300) @(negedge clk);
    lemo(lemo_bcr);
    ext_pulse(50);
    repeat (300) @(negedge clk);
    l1a_src_ext = 0;

    // let the Dout queue drain
    repeat (400) @(negedge clk);
    check(exp_at.size() == 0, $sformatf("%0d Dout bytes never sent", exp_at.size()));

    $display("L1A %0d, Dout events %0d; random %0d regular %0d external %0d",
             n_l1a, dout_events, m_rand, m_reg, m_ext);
    $display("waits: empty bunch %0d dead time %0d; queued Dout %0d; ECR %0d BCR %0d RST %0d B6 %0d modes %0d",
             m_wait_empty, m_dead, m_queue, m_ecr, m_bcr, m_rst, m_b6, m_mode);
    check(m_rand > 0, "random trigger mechanism");
    check(m_reg > 0, "regular trigger mechanism");
    check(m_ext > 0, "external trigger mechanism");
    check(m_wait_empty > 0, "wait for filled bunch");
    check(m_dead > 0, "dead-time wait");
    check(m_queue > 0, "several events queued for Dout");
    check(m_ecr > 0 && m_bcr > 0 && m_rst > 0 && m_b6 > 0, "broadcast inputs");
    check(m_mode >= 4, "mode switches");
    check(dout_events == n_l1a, "one Dout sequence per L1A");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
