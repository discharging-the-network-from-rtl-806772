// ingress_adapter: network adapter in front of one fabric input.
//
// Arriving packets (destination + payload tag) are stored in per-flow
// virtual output queues (VOQs), one per fabric output. For every flow the
// adapter keeps pr (pending requests) and rg (received grants), both reset
// to zero. A round-robin request arbiter sends at most one request per
// cycle, for a flow that holds packets not yet requested (VOQ count > pr+rg)
// and has fewer than U requests pending; pr then rises by one. A grant
// moves one unit from pr to rg. A round-robin input link arbiter injects
// the head packet of a flow with rg > 0, provided the A-stage crosspoint
// buffer selected by the flow's distribution pointer has a hop-by-hop
// credit. The packet is stamped with source, destination, route (B switch)
// and a per-flow sequence number; rg, the credit, and the VOQ count drop by
// one, and the distribution pointer and sequence number advance.
// The distribution pointer of flow i->j starts at 0 and advances once per
// packet, exactly as the distribution counter of output arbiter j advances
// once per grant, so both name the same B switch for the n-th packet.
// VOQs, pr/rg, request throttling by U, the link arbiter and the
// synchronized pointers follow the scheme. The finite VOQ depth (the scheme
// assumes unbounded VOQs), the in_ready backpressure towards the host, one
// credit per request message, and one packet per cycle are choices here.
module ingress_adapter
  import fc_pkg::*;
#(
  parameter int unsigned N         = 64,
  parameter int unsigned M         = 8,
  parameter int unsigned U         = 32,  // max pending requests per flow
  parameter int unsigned XP_DEPTH  = 12,  // A-stage crosspoint buffer
  parameter int unsigned VOQ_DEPTH = 32   // packets per VOQ
) (
  input  logic     clk,
  input  logic     rst_n,
  input  port_t    adapter_id,   // this adapter's fabric port (strap)
  // host side
  input  logic     in_valid,
  input  port_t    in_dst,
  input  payload_t in_payload,
  output logic     in_ready,     // VOQ of in_dst has room
  // scheduler side
  output req_t     req,
  input  gnt_t     gnt,
  // fabric side
  output pkt_t     out_pkt,      // to A switch, registered
  input  hcred_t   hcred,        // credit from A switch crosspoint
  // events, for observation
  output logic     ev_req_throttled,  // a flow wanted to request but pr == U
  output logic     ev_link_stall      // a granted flow waited for an A-stage credit
);
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned RW = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned QW = $clog2(VOQ_DEPTH + 1);
  localparam int unsigned AW = (VOQ_DEPTH > 1) ? $clog2(VOQ_DEPTH) : 1;
  localparam int unsigned CW = $clog2(U + 1);
  localparam int unsigned KW = $clog2(XP_DEPTH + 1);

  payload_t      voq_mem [N][VOQ_DEPTH];
  logic [AW-1:0] voq_rd  [N];
  logic [AW-1:0] voq_wr  [N];
  logic [QW-1:0] voq_cnt [N];
  logic [CW-1:0] pr      [N];
  logic [QW-1:0] rg      [N];   // rg + pr never exceeds the VOQ count
  logic [RW-1:0] dptr    [N];
  seq_t          seq     [N];
  logic [KW-1:0] acred   [M];

  logic [N-1:0]  req_elig, link_elig, want_req, want_link;
  logic          rq_v, lk_v;
  logic [IW-1:0] rq_j, lk_j;
  logic          push;

  always_comb begin
    for (int j = 0; j < N; j++) begin
      want_req[j]  = (int'(voq_cnt[j]) > int'(pr[j]) + int'(rg[j]));
      req_elig[j]  = want_req[j] && (int'(pr[j]) < U);
      want_link[j] = (rg[j] != 0);
      link_elig[j] = want_link[j] && (acred[dptr[j]] != 0);
    end
  end

  assign in_ready = (int'(voq_cnt[in_dst[IW-1:0]]) < VOQ_DEPTH);
  assign push     = in_valid && in_ready;
  assign ev_req_throttled = |(want_req & ~req_elig);
  assign ev_link_stall    = |(want_link & ~link_elig);

  rr_arbiter #(.N(N)) u_req_arb (
    .clk, .rst_n, .req(req_elig), .advance(1'b1), .gnt_valid(rq_v), .gnt_idx(rq_j)
  );
  rr_arbiter #(.N(N)) u_link_arb (
    .clk, .rst_n, .req(link_elig), .advance(1'b1), .gnt_valid(lk_v), .gnt_idx(lk_j)
  );

  always_ff @(posedge clk) begin
    if (push) voq_mem[in_dst[IW-1:0]][voq_wr[in_dst[IW-1:0]]] <= in_payload;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) begin
        voq_rd[j] <= '0; voq_wr[j] <= '0; voq_cnt[j] <= '0;
        pr[j] <= '0; rg[j] <= '0; dptr[j] <= '0; seq[j] <= '0;
      end
      for (int k = 0; k < M; k++) acred[k] <= KW'(XP_DEPTH);
      req     <= '0;
      out_pkt <= '0;
    end else begin
      for (int j = 0; j < N; j++) begin
        logic pj, gj, lj, rj;
        pj = push && (int'(in_dst) == j);
        lj = lk_v && (int'(lk_j) == j);
        rj = rq_v && (int'(rq_j) == j);
        gj = gnt.valid && (int'(gnt.dst) == j);
        voq_cnt[j] <= voq_cnt[j] + QW'(pj) - QW'(lj);
        if (pj) voq_wr[j] <= (int'(voq_wr[j]) == VOQ_DEPTH - 1) ? '0 : voq_wr[j] + 1'b1;
        if (lj) begin
          voq_rd[j] <= (int'(voq_rd[j]) == VOQ_DEPTH - 1) ? '0 : voq_rd[j] + 1'b1;
          dptr[j]   <= (int'(dptr[j]) == M - 1) ? '0 : dptr[j] + 1'b1;
          seq[j]    <= seq[j] + 1'b1;
        end
        pr[j] <= pr[j] + CW'(rj) - CW'(gj);
        rg[j] <= rg[j] + QW'(gj) - QW'(lj);
      end
      for (int k = 0; k < M; k++)
        acred[k] <= acred[k]
                  + KW'((hcred.valid && int'(hcred.idx) == k))
                  - KW'((lk_v && int'(dptr[lk_j]) == k));
      req.valid <= rq_v;
      req.dst   <= port_t'(rq_j);
      out_pkt.valid   <= lk_v;
      out_pkt.src     <= adapter_id;
      out_pkt.dst     <= port_t'(lk_j);
      out_pkt.route   <= route_t'(dptr[lk_j]);
      out_pkt.seq     <= seq[lk_j];
      out_pkt.payload <= voq_mem[lk_j][voq_rd[lk_j]];
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) gnt.valid |-> pr[gnt.dst[IW-1:0]] != 0)
    else $error("ingress_adapter: grant without a pending request");
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(hcred.valid && int'(acred[hcred.idx]) == XP_DEPTH))
    else $error("ingress_adapter: A-stage credit beyond crosspoint size");
endmodule
