// central_scheduler: the central scheduling unit of the fabric.
//
// It holds N output arbiters (one per fabric output, reserving C-stage
// crosspoint buffer space) and N input arbiters (one per fabric input,
// serializing grants). A request from adapter i for output j increments
// request counter i->j inside output arbiter j. A grant from output arbiter
// j increments grant counter i->j inside input arbiter i, which forwards at
// most one grant per cycle to adapter i. End-to-end credits from egress
// adapter j go straight to output arbiter j. Requests, grants and credits
// are modelled as direct point-to-point wires; the scheme carries them
// through the A and C switches to save pins, which only adds latency.
// Latency: a request valid at the input in cycle t can give a grant valid
// at the adapter in cycle t+4 (request counter, output arbiter register,
// grant counter, input arbiter register).
module central_scheduler
  import fc_pkg::*;
#(
  parameter int unsigned N        = 64,
  parameter int unsigned M        = 8,
  parameter int unsigned XP_DEPTH = 12,
  parameter int unsigned U        = 32
) (
  input  logic   clk,
  input  logic   rst_n,
  input  req_t   req   [N],   // from ingress adapter i
  input  ecred_t ecred [N],   // from egress adapter j
  output gnt_t   gnt   [N],   // to ingress adapter i
  output logic [N-1:0] oa_grant_valid,   // output arbiter j granted this cycle
  output route_t       oa_grant_route [N], // and the B switch it reserved
  output logic [N-1:0] ev_credit_block,  // per output: a flow waits for credit
  output logic [N-1:0] ev_serialize      // per input: grants queued
);
  localparam int unsigned IW = $clog2(N);

  logic [N-1:0]  oa_req_inc [N];   // [output j][input i]
  logic [N-1:0]  ia_gnt_inc [N];   // [input i][output j]
  logic          oa_gv      [N];
  logic [IW-1:0] oa_gsrc    [N];
  route_t        oa_groute  [N];

  for (genvar j = 0; j < N; j++) begin : g_oa_inc
    for (genvar i = 0; i < N; i++) begin : g_in
      assign oa_req_inc[j][i] = req[i].valid && (int'(req[i].dst) == j);
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_ia_inc
    for (genvar j = 0; j < N; j++) begin : g_out
      assign ia_gnt_inc[i][j] = oa_gv[j] && (int'(oa_gsrc[j]) == i);
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_oa
    output_arbiter #(.N(N), .M(M), .XP_DEPTH(XP_DEPTH), .U(U)) u_oa (
      .clk, .rst_n,
      .out_id   (port_t'(j)),
      .req_inc  (oa_req_inc[j]),
      .ecred    (ecred[j]),
      .gnt_valid(oa_gv[j]),
      .gnt_src  (oa_gsrc[j]),
      .gnt_route(oa_groute[j]),
      .ev_credit_block(ev_credit_block[j])
    );
    assign oa_grant_valid[j] = oa_gv[j];
    assign oa_grant_route[j] = oa_groute[j];
  end

  for (genvar i = 0; i < N; i++) begin : g_ia
    input_arbiter #(.N(N), .U(U)) u_ia (
      .clk, .rst_n, .gnt_inc(ia_gnt_inc[i]), .gnt(gnt[i]), .ev_serialize(ev_serialize[i])
    );
  end
endmodule
