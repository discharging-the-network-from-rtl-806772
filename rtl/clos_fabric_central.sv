// clos_fabric_central: three-stage Clos fabric with proactive buffer
// reservations and a central scheduler (top level).
//
// N = M*M ports. N ingress adapters feed M first-stage (A) switches, M
// per switch; every A switch has one link to every middle (B) switch, every
// B switch one link to every last-stage (C) switch, and each C switch feeds
// M egress adapters. All switches are M x M buffered crossbars.
// Before a packet may enter the fabric its adapter asks the central
// scheduler for a credit; output arbiter j grants only when it has reserved
// a slot in the C-stage crosspoint buffer the packet will use, so the
// traffic inside the fabric towards any output never exceeds what fits in
// front of it. Packets of a flow are sprayed over all B switches, one after
// the other, by per-flow distribution pointers kept in step in the adapter
// and in the output arbiter. A-stage buffers are protected by hop-by-hop
// credits (adapter -> A, A -> B); B -> C and C -> egress need none. The
// egress adapter re-sequences and returns an end-to-end credit to output
// arbiter j when a packet becomes in order.
// Adapter i sits on A switch i / M, input i mod M; output j on C switch
// j / M, output j mod M. Link k of A switch a goes to input a of B switch
// k; link c of B switch k goes to input k of C switch c.
// One packet time is one clock cycle. Host interface per port: a packet
// (destination, payload tag) is accepted when in_valid && in_ready; packets
// leave on out_pkt in order per flow. The ev_* outputs pulse when a
// mechanism of the scheme acts, for observation.
// The parameter defaults are the configuration evaluated for this scheme:
// 64 ports of 8 x 8 switches, 12-packet crosspoints, 32 outstanding
// requests per flow, a 300-packet re-sequencing buffer. VOQ_DEPTH is this
// design's choice (the scheme treats VOQs as unbounded).
module clos_fabric_central
  import fc_pkg::*;
#(
  parameter int unsigned M         = 8,
  parameter int unsigned N         = M * M,
  parameter int unsigned XP_DEPTH  = 12,
  parameter int unsigned U         = 32,
  parameter int unsigned VOQ_DEPTH = 32,
  parameter int unsigned ROB_SIZE  = 300
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid   [N],
  input  port_t    in_dst     [N],
  input  payload_t in_payload [N],
  output logic     in_ready   [N],
  output pkt_t     out_pkt    [N],
  output logic [N-1:0] ev_req_throttled,
  output logic [N-1:0] ev_link_stall,
  output logic [M-1:0] ev_bp_stall_a,
  output logic [N-1:0] ev_reorder,
  output logic [N-1:0] ev_credit_block,
  output logic [N-1:0] ev_serialize
);
  req_t   req      [N];
  gnt_t   gnt      [N];
  ecred_t ecred    [N];
  pkt_t   ing_pkt  [N];
  hcred_t ing_cred [N];

  pkt_t   a_in  [M][M];  pkt_t   a_out [M][M];
  hcred_t a_ci  [M][M];  hcred_t a_co  [M][M];
  pkt_t   b_in  [M][M];  pkt_t   b_out [M][M];
  hcred_t b_ci  [M][M];  hcred_t b_co  [M][M];
  pkt_t   c_in  [M][M];  pkt_t   c_out [M][M];
  hcred_t c_ci  [M][M];  hcred_t c_co  [M][M];
  logic   b_ev  [M];     logic   c_ev  [M];
  logic [N-1:0] oa_gv_unused;
  route_t       oa_gr_unused [N];

  central_scheduler #(.N(N), .M(M), .XP_DEPTH(XP_DEPTH), .U(U)) u_sched (
    .clk, .rst_n,
    .req, .ecred, .gnt,
    .oa_grant_valid (oa_gv_unused),
    .oa_grant_route (oa_gr_unused),
    .ev_credit_block(ev_credit_block),
    .ev_serialize   (ev_serialize)
  );

  for (genvar i = 0; i < N; i++) begin : g_port
    ingress_adapter #(.N(N), .M(M), .U(U), .XP_DEPTH(XP_DEPTH),
                      .VOQ_DEPTH(VOQ_DEPTH)) u_ing (
      .clk, .rst_n,
      .adapter_id(port_t'(i)),
      .in_valid  (in_valid[i]),
      .in_dst    (in_dst[i]),
      .in_payload(in_payload[i]),
      .in_ready  (in_ready[i]),
      .req       (req[i]),
      .gnt       (gnt[i]),
      .out_pkt   (ing_pkt[i]),
      .hcred     (ing_cred[i]),
      .ev_req_throttled(ev_req_throttled[i]),
      .ev_link_stall   (ev_link_stall[i])
    );
    assign a_in[i / M][i % M] = ing_pkt[i];
    assign ing_cred[i]        = a_co[i / M][i % M];

    egress_adapter #(.N(N), .ROB_SIZE(ROB_SIZE)) u_egr (
      .clk, .rst_n,
      .in_pkt    (c_out[i / M][i % M]),
      .out_pkt   (out_pkt[i]),
      .ecred     (ecred[i]),
      .ev_reorder(ev_reorder[i]),
      .occupancy ()
    );
  end

  for (genvar s = 0; s < M; s++) begin : g_sw
    for (genvar l = 0; l < M; l++) begin : g_link
      assign b_in[l][s] = a_out[s][l];   // A s, link l -> B l, input s
      assign a_ci[s][l] = b_co[l][s];    // credits B l, input s -> A s, link l
      assign c_in[l][s] = b_out[s][l];   // B s, link l -> C l, input s
      assign b_ci[s][l] = '0;            // no backpressure B -> C
      assign c_ci[s][l] = '0;            // none C -> egress
    end
    xbar_switch #(.M(M), .XP_DEPTH(XP_DEPTH), .DS_DEPTH(XP_DEPTH), .STAGE(0)) u_a (
      .clk, .rst_n, .in_pkt(a_in[s]), .out_pkt(a_out[s]),
      .hcred_in(a_ci[s]), .hcred_out(a_co[s]), .ev_bp_stall(ev_bp_stall_a[s])
    );
    xbar_switch #(.M(M), .XP_DEPTH(XP_DEPTH), .DS_DEPTH(XP_DEPTH), .STAGE(1)) u_b (
      .clk, .rst_n, .in_pkt(b_in[s]), .out_pkt(b_out[s]),
      .hcred_in(b_ci[s]), .hcred_out(b_co[s]), .ev_bp_stall(b_ev[s])
    );
    xbar_switch #(.M(M), .XP_DEPTH(XP_DEPTH), .DS_DEPTH(XP_DEPTH), .STAGE(2)) u_c (
      .clk, .rst_n, .in_pkt(c_in[s]), .out_pkt(c_out[s]),
      .hcred_in(c_ci[s]), .hcred_out(c_co[s]), .ev_bp_stall(c_ev[s])
    );
  end

  initial assert (N == M * M) else $fatal(1, "clos_fabric_central: N must equal M*M");
endmodule
