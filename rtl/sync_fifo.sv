// sync_fifo: single-clock first-in first-out queue.
//
// DEPTH entries of type T in a register array with read and write
// pointers one bit wider than the address, so full and empty are told
// apart by the extra bit. The head entry is shown on rd_data while empty
// is low; pop removes it on the clock edge. A push when full and a pop
// when empty are ignored (and flagged by assertions).
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 64            // power of two
) (
  input  logic clk,
  input  logic rst,          // synchronous, active high
  input  logic push,
  input  T     wr_data,
  input  logic pop,
  output T     rd_data,
  output logic empty,
  output logic full,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  T              mem [DEPTH];
  logic [AW:0]   wp_q, rp_q;

  assign empty   = (wp_q == rp_q);
  assign full    = (wp_q[AW] != rp_q[AW]) && (wp_q[AW-1:0] == rp_q[AW-1:0]);
  assign count   = wp_q - rp_q;
  assign rd_data = mem[rp_q[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wp_q[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp_q <= '0;
      rp_q <= '0;
    end else begin
      if (push && !full) wp_q <= wp_q + 1'b1;
      if (pop && !empty) rp_q <= rp_q + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) pop  |-> !empty);

endmodule
