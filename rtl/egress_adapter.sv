// egress_adapter: network adapter behind one fabric output j.
//
// Packets of one flow may take different B switches and arrive out of
// order. The adapter keeps, per source i, the next expected sequence number.
// Each cycle it makes at most one packet "in order": a packet stored in the
// re-sequencing buffer whose sequence number equals its source's expected
// number (lowest slot first), or else the packet arriving this cycle if it
// is the expected one. That packet leaves on the egress link on the next
// clock edge, the expected number of its source advances, and an
// end-to-end credit naming the packet's B switch goes to output arbiter j:
// credits are returned when a packet becomes in order, not when it leaves
// the C stage, so the scheduler also bounds the re-sequencing buffer.
// Any other arriving packet is written into a free slot of the buffer
// (ROB_SIZE slots, searched associatively). Returning one credit and
// sending one packet per cycle at most follows the scheme; the slot
// organization and the immediate departure of in-order packets (the egress
// link is never blocked) are this RTL's choices.
module egress_adapter
  import fc_pkg::*;
#(
  parameter int unsigned N        = 64,
  parameter int unsigned ROB_SIZE = 300
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pkt_t   in_pkt,     // from C switch
  output pkt_t   out_pkt,    // egress link, registered
  output ecred_t ecred,      // to output arbiter, registered
  output logic   ev_reorder, // an arriving packet was out of order and stored
  output logic [$clog2(ROB_SIZE+1)-1:0] occupancy
);
  localparam int unsigned SW = $clog2(ROB_SIZE);
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned OW = $clog2(ROB_SIZE + 1);

  pkt_t          slot   [ROB_SIZE];
  logic          slot_v [ROB_SIZE];
  seq_t          exp_seq[N];

  logic          hit_v;
  logic [SW-1:0] hit_s;
  logic          free_v;
  logic [SW-1:0] free_s;
  logic          arr_inorder, take_arr, store_arr;

  always_comb begin
    hit_v  = 1'b0;
    hit_s  = '0;
    free_v = 1'b0;
    free_s = '0;
    for (int s = 0; s < ROB_SIZE; s++) begin
      if (!hit_v && slot_v[s] && slot[s].seq == exp_seq[slot[s].src[IW-1:0]]) begin
        hit_v = 1'b1;
        hit_s = SW'(s);
      end
      if (!free_v && !slot_v[s]) begin
        free_v = 1'b1;
        free_s = SW'(s);
      end
    end
    arr_inorder = in_pkt.valid && (in_pkt.seq == exp_seq[in_pkt.src[IW-1:0]]);
    take_arr    = arr_inorder && !hit_v;
    store_arr   = in_pkt.valid && !take_arr;
  end

  assign ev_reorder = store_arr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < ROB_SIZE; s++) slot_v[s] <= 1'b0;
      for (int i = 0; i < N; i++) exp_seq[i] <= '0;
      out_pkt   <= '0;
      ecred     <= '0;
      occupancy <= '0;
    end else begin
      out_pkt <= '0;
      ecred   <= '0;
      if (hit_v) begin
        slot_v[hit_s] <= 1'b0;
        out_pkt       <= slot[hit_s];
        ecred.valid   <= 1'b1;
        ecred.route   <= slot[hit_s].route;
        exp_seq[slot[hit_s].src[IW-1:0]] <= slot[hit_s].seq + 1'b1;
      end else if (take_arr) begin
        out_pkt     <= in_pkt;
        ecred.valid <= 1'b1;
        ecred.route <= in_pkt.route;
        exp_seq[in_pkt.src[IW-1:0]] <= in_pkt.seq + 1'b1;
      end
      if (store_arr && free_v) begin
        slot_v[free_s] <= 1'b1;
        slot[free_s]   <= in_pkt;
      end
      occupancy <= occupancy + OW'((store_arr && free_v)) - OW'(hit_v);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(store_arr && !free_v))
    else $error("egress_adapter: re-sequencing buffer overflow");
endmodule
