// dout_sequencer: trigger type and event/orbit counter on the Dout bus.
//
// In the TTC system the TTCvi module broadcasts, about 4.4 us after each
// L1A, the 8-bit trigger type and a 24-bit event/orbit counter over the
// B channel; the TTCrx puts them on Dout<7:0> with DoutStr, and
// SubAddr<1:0> tells which byte is on the bus. This module emulates that.
// At every L1A (fire) it queues the event number, the trigger type and a
// time stamp. When the head of the queue is DELAY clocks old it sends four
// bytes in four consecutive clocks, each with DoutStr:
//   SubAddr 00: trigger type
//   SubAddr 01: event counter bits 23:16
//   SubAddr 10: bits 15:8
//   SubAddr 11: bits 7:0
// Queueing lets L1As come faster than one per 4.4 us; the queue holds
// DEPTH events, and full asks l1a_controller to hold the next L1A.
//
// Timing: with fire in clock k (L1Accept in k+1), the first byte is on the
// registered outputs in clock k+1+DELAY. DELAY defaults to 176 clocks,
// 4.39 us at 40.08 MHz. Dout and SubAddr keep their last value between
// sequences.
//
// Taken from the original emulator design: the delay, the byte order, the SubAddr code
// and the use of the BCnt event number as event/orbit counter. Own
// choices: the queue, its depth and the time-stamp method.
module dout_sequencer
  import ttc_emu_pkg::*;
#(
  parameter int unsigned DELAY = DOUT_DELAY_CLK,
  parameter int unsigned DEPTH = 64
) (
  input  logic               clk,
  input  logic               rst,          // synchronous, active high
  input  logic               fire,         // L1A in this clock
  input  logic [EVID_W-1:0]  evid,         // its event number
  input  logic [TTYPE_W-1:0] trigger_type, // its trigger type
  output logic [7:0]         dout,         // Dout<7:0>
  output logic               dout_str,     // DoutStr
  output logic [1:0]         sub_addr,     // SubAddr<1:0>
  output logic               full          // queue cannot take an event
);

  localparam int unsigned TW = $clog2(DELAY + 1) + 2;  // time-stamp width

  typedef struct packed {
    logic [TW-1:0]      stamp;
    logic [TTYPE_W-1:0] ttype;
    logic [EVID_W-1:0]  evid;
  } entry_t;

  logic [TW-1:0] now_q;
  entry_t        head;
  logic          empty, due, start;
  logic [2:0]    byte_q;     // 0: idle, 1..4: byte being sent next
  logic [EVID_W-1:0] ev_q;   // event number being sent

  always_ff @(posedge clk) begin
    if (rst) now_q <= '0;
    else     now_q <= now_q + 1'b1;
  end

  sync_fifo #(.T(entry_t), .DEPTH(DEPTH)) u_queue (
    .clk, .rst,
    .push   (fire),
    .wr_data('{stamp: now_q, ttype: trigger_type, evid: evid}),
    .pop    (start),
    .rd_data(head),
    .empty,
    .full,
    .count  ()
  );

  // The first byte is registered DELAY clocks after the L1A's register
  // stage, so the start decision is taken DELAY clocks after fire.
  assign due   = !empty && ((now_q - head.stamp) >= TW'(DELAY));
  assign start = due && (byte_q == 3'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      byte_q   <= 3'd0;
      ev_q     <= '0;
      dout     <= '0;
      dout_str <= 1'b0;
      sub_addr <= 2'b00;
    end else begin
      dout_str <= 1'b0;
      if (start) begin
        ev_q     <= head.evid;
        dout     <= head.ttype;
        sub_addr <= SA_TTYPE;
        dout_str <= 1'b1;
        byte_q   <= 3'd2;
      end else begin
        unique case (byte_q)
          3'd2: begin
            dout     <= ev_q[23:16];
            sub_addr <= SA_EV_HI;
            dout_str <= 1'b1;
            byte_q   <= 3'd3;
          end
          3'd3: begin
            dout     <= ev_q[15:8];
            sub_addr <= SA_EV_MID;
            dout_str <= 1'b1;
            byte_q   <= 3'd4;
          end
          3'd4: begin
            dout     <= ev_q[7:0];
            sub_addr <= SA_EV_LO;
            dout_str <= 1'b1;
            byte_q   <= 3'd0;
          end
          default: byte_q <= 3'd0;
        endcase
      end
    end
  end

endmodule
