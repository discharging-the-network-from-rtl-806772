// xp_fifo: small synchronous FIFO of packets, used as a crosspoint buffer.
//
// DEPTH entries of pkt_t held in a register array with read and write
// pointers and an occupancy count. Push and pop may happen in the same
// cycle. The head entry is visible combinationally on `head` while `empty`
// is low (first-word fall-through). Pushing into a full FIFO is a protocol
// error: the credit flow control around every crosspoint must prevent it,
// and an assertion reports it in simulation.
module xp_fifo
  import fc_pkg::*;
#(
  parameter int unsigned DEPTH = 12
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  pkt_t din,
  input  logic pop,
  output pkt_t head,
  output logic empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNTW = $clog2(DEPTH + 1);

  pkt_t          mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;

  assign empty = (count == 0);
  assign head  = mem[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= (int'(wr_ptr) == DEPTH - 1) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (int'(rd_ptr) == DEPTH - 1) ? '0 : rd_ptr + 1'b1;
      count <= count + CNTW'(push) - CNTW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && !pop && int'(count) == DEPTH))
    else $error("xp_fifo overflow");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("xp_fifo underflow");
endmodule
