// xbar_switch: M x M buffered-crossbar switching element of the Clos fabric.
//
// Every input line p has one crosspoint buffer of XP_DEPTH packets per
// output q. A packet arriving on input p goes into crosspoint (p,q), where q
// depends on the stage: in an A switch q is the packet's route (its B
// switch), in a B switch q = dst / M (the C switch), in a C switch
// q = dst mod M (the egress adapter). Each output has a round-robin arbiter
// over its M crosspoints and forwards one packet per cycle (cut-through: a
// packet can leave the cycle after it arrived).
// Hop-by-hop flow control: in the A stage each output keeps M credit
// counters, one per crosspoint buffer on the corresponding input line of the
// downstream B switch (the one for C switch dst / M), initialised to
// DS_DEPTH, and forwards a packet only if that credit is non-zero. B and C
// outputs need no credits: the output arbiters have already reserved
// C-stage space, and egress adapters never push back. Every switch except
// the C stage returns credits upstream: when crosspoint (p,q) releases a
// packet, a credit naming q is queued for input line p, and each input line
// returns at most one credit per cycle, round robin over its crosspoints.
// Crossbar, crosspoint buffers, credit counters and the one-credit-per-cycle
// peak rate follow the scheme; the stage-dependent routing code and the
// pending-credit counters are this RTL's way of realizing them.
module xbar_switch
  import fc_pkg::*;
#(
  parameter int unsigned M        = 8,
  parameter int unsigned XP_DEPTH = 12,  // this switch's crosspoint buffers
  parameter int unsigned DS_DEPTH = 12,  // downstream crosspoint buffers (A stage)
  parameter int unsigned STAGE    = 0    // 0 = A, 1 = B, 2 = C
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pkt_t   in_pkt    [M],
  output pkt_t   out_pkt   [M],   // registered
  input  hcred_t hcred_in  [M],   // from downstream, per output (A stage)
  output hcred_t hcred_out [M],   // to upstream, per input (A and B stage)
  output logic   ev_bp_stall      // an output held a packet for lack of credit
);
  localparam int unsigned RW = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned KW = $clog2(DS_DEPTH + 1);
  localparam int unsigned PW = $clog2(XP_DEPTH + 1);
  localparam bit BACKPRESSURE = (STAGE == 0);
  localparam bit UP_CREDITS   = (STAGE != 2);

  function automatic logic [RW-1:0] out_of(input pkt_t p);
    case (STAGE)
      0:       return RW'(p.route);
      1:       return RW'(int'(p.dst) / M);
      default: return RW'(int'(p.dst) % M);
    endcase
  endfunction

  pkt_t          xp_head [M][M];
  logic          xp_empty[M][M];
  logic [M-1:0]  xp_push [M];       // [p][q]
  logic [M-1:0]  xp_pop  [M];       // [p][q]
  logic [KW-1:0] ds_cred [M][M];    // [q][downstream crosspoint]
  logic [PW-1:0] pend    [M][M];    // [p][q] credits owed upstream
  logic [M-1:0]  elig    [M];       // [q][p]
  logic [M-1:0]  nonempty[M];       // [q][p]
  logic [M-1:0]  owe     [M];       // [p][q]
  logic          o_v  [M];
  logic [RW-1:0] o_p  [M];
  logic          c_v  [M];
  logic [RW-1:0] c_q  [M];
  logic [M-1:0]  stall_q;

  for (genvar p = 0; p < M; p++) begin : g_in
    for (genvar q = 0; q < M; q++) begin : g_xp
      logic [$clog2(XP_DEPTH+1)-1:0] cnt_unused;
      assign xp_push[p][q] = in_pkt[p].valid && (out_of(in_pkt[p]) == RW'(q));
      xp_fifo #(.DEPTH(XP_DEPTH)) u_xp (
        .clk, .rst_n,
        .push (xp_push[p][q]),
        .din  (in_pkt[p]),
        .pop  (xp_pop[p][q]),
        .head (xp_head[p][q]),
        .empty(xp_empty[p][q]),
        .count(cnt_unused)
      );
    end
  end

  always_comb begin
    for (int q = 0; q < M; q++) begin
      for (int p = 0; p < M; p++) begin
        nonempty[q][p] = !xp_empty[p][q];
        if (BACKPRESSURE)
          elig[q][p] = nonempty[q][p] && (ds_cred[q][int'(xp_head[p][q].dst) / M] != 0);
        else
          elig[q][p] = nonempty[q][p];
      end
      stall_q[q] = (nonempty[q] != '0) && (elig[q] == '0);
    end
    for (int p = 0; p < M; p++)
      for (int q = 0; q < M; q++) begin
        xp_pop[p][q] = o_v[q] && (o_p[q] == RW'(p));
        owe[p][q]    = (pend[p][q] != 0);
      end
  end
  assign ev_bp_stall = |stall_q;

  for (genvar q = 0; q < M; q++) begin : g_out
    rr_arbiter #(.N(M)) u_oarb (
      .clk, .rst_n, .req(elig[q]), .advance(1'b1), .gnt_valid(o_v[q]), .gnt_idx(o_p[q])
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) out_pkt[q] <= '0;
      else if (o_v[q]) out_pkt[q] <= xp_head[o_p[q]][q];
      else out_pkt[q] <= '0;
    end
  end

  for (genvar p = 0; p < M; p++) begin : g_cred
    rr_arbiter #(.N(M)) u_carb (
      .clk, .rst_n, .req(owe[p]), .advance(1'b1), .gnt_valid(c_v[p]), .gnt_idx(c_q[p])
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) hcred_out[p] <= '0;
      else begin
        hcred_out[p].valid <= UP_CREDITS && c_v[p];
        hcred_out[p].idx   <= route_t'(c_q[p]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < M; q++)
        for (int k = 0; k < M; k++) ds_cred[q][k] <= KW'(DS_DEPTH);
      for (int p = 0; p < M; p++)
        for (int q = 0; q < M; q++) pend[p][q] <= '0;
    end else begin
      for (int q = 0; q < M; q++)
        for (int k = 0; k < M; k++)
          ds_cred[q][k] <= ds_cred[q][k]
            + KW'((BACKPRESSURE && hcred_in[q].valid && int'(hcred_in[q].idx) == k))
            - KW'((BACKPRESSURE && o_v[q] && int'(xp_head[o_p[q]][q].dst) / M == k));
      for (int p = 0; p < M; p++)
        for (int q = 0; q < M; q++)
          pend[p][q] <= pend[p][q]
            + PW'((UP_CREDITS && xp_pop[p][q]))
            - PW'((c_v[p] && int'(c_q[p]) == q));
    end
  end
endmodule
