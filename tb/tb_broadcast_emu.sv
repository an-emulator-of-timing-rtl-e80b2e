// tb_broadcast_emu: checks the broadcast outputs.
//
// Random combinations of the four Lemo pulses; one clock later BCntRes and
// EvCntRes must follow their inputs, RST must set Brcst<5> and Brcst<7>
// with both strobes, Brcst<6> must come with BrcstStr2 only, Brcst<4:2>
// stay 0, and all bits are 0 outside a strobe.
module tb_broadcast_emu;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic rst, bcr_in, ecr_in, rst_in, b6_in;
  logic bcnt_res, evcnt_res, brcst_str1, brcst_str2;
  logic [7:2] brcst;
  int checks = 0, failures = 0;

  always #12.475 clk = ~clk;

  broadcast_emu dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic a, b, c, d;
  logic [7:2] exp_b;
  initial begin
    rst = 1; bcr_in = 0; ecr_in = 0; rst_in = 0; b6_in = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3000) begin
      a = $urandom_range(0, 3) == 0; b = $urandom_range(0, 3) == 0;
      c = $urandom_range(0, 3) == 0; d = $urandom_range(0, 3) == 0;
      bcr_in = a; ecr_in = b; rst_in = c; b6_in = d;
      @(negedge clk);
      bcr_in = 0; ecr_in = 0; rst_in = 0; b6_in = 0;
      exp_b = '0;
      exp_b[5] = c; exp_b[7] = c; exp_b[6] = d;
      checks++;
      if (bcnt_res !== a || evcnt_res !== b || brcst !== exp_b ||
          brcst_str1 !== c || brcst_str2 !== (c | d)) begin
        failures++;
        $display("FAIL: in %b%b%b%b -> res %b%b brcst %b str %b%b",
                 a, b, c, d, bcnt_res, evcnt_res, brcst, brcst_str1, brcst_str2);
      end
      @(negedge clk);
      checks++;
      if (bcnt_res || evcnt_res || brcst != 0 || brcst_str1 || brcst_str2) begin
        failures++;
        $display("FAIL: outputs not cleared after one clock");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
