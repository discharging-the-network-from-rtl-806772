// output_arbiter: credit arbiter for one fabric output j in the central
// scheduler.
//
// It keeps, per input i, a request counter (outstanding requests of flow
// i->j) and a distribution counter (which B switch the next packet of flow
// i->j goes through), and, per B switch k, a credit counter for the C-stage
// crosspoint buffer that B switch k feeds in front of output j. A flow is
// eligible when its request count is non-zero and the credit counter its
// distribution counter points at is non-zero. Each cycle (one packet time)
// at most one eligible flow is served: its request count and the selected
// credit count drop by one, its distribution counter advances to the next B
// switch, and a grant (input i, route k) leaves on the next clock edge.
// End-to-end credits from egress adapter j return one slot to counter k.
//
// Arbitration is round robin, but each output visits the inputs in its own
// fixed pseudo-random order, position p -> input (p*a_j + b_j) mod N with a
// fixed odd a_j (j is a strap input); this requires N to be a power of two. The per-flow counters,
// the distribution counters, the M credit counters and the random but fixed
// visiting order follow the scheme; the hash that makes the order, the
// counter widths and the one-cycle grant register are choices of this RTL.
// Requests may arrive on any input every cycle; the sender keeps at most U
// outstanding per flow, so a counter never exceeds U.
module output_arbiter
  import fc_pkg::*;
#(
  parameter int unsigned N        = 64,  // fabric ports
  parameter int unsigned M        = 8,   // B switches (paths)
  parameter int unsigned XP_DEPTH = 12,  // C-stage crosspoint buffer, packets
  parameter int unsigned U        = 32   // max outstanding requests per flow
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  port_t                out_id,      // this output's index j (strap)
  input  logic [N-1:0]         req_inc,     // one new request from input i
  input  ecred_t               ecred,       // end-to-end credit return
  output logic                 gnt_valid,   // registered grant
  output logic [$clog2(N)-1:0] gnt_src,
  output route_t               gnt_route,
  output logic                 ev_credit_block // a flow with requests waits for a credit
);
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned RW = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned CW = $clog2(U + 1);
  localparam int unsigned KW = $clog2(XP_DEPTH + 1);

  logic [CW-1:0] req_cnt  [N];
  logic [RW-1:0] dist_cnt [N];
  logic [KW-1:0] cred_cnt [M];

  // eligibility in visiting-order positions
  logic [N-1:0]  elig_pos;
  logic [IW-1:0] pos_to_in [N];
  logic          win_valid;
  logic [IW-1:0] win_pos;
  logic [IW-1:0] win_in;

  always_comb begin
    logic [31:0] a, b;
    a = perm_mult(int'(out_id));
    b = perm_add(int'(out_id));
    for (int unsigned p = 0; p < N; p++) begin
      pos_to_in[p] = IW'((p * a + b) % N);
      elig_pos[p]  = (req_cnt[pos_to_in[p]] != 0) && (cred_cnt[dist_cnt[pos_to_in[p]]] != 0);
    end
  end

  rr_arbiter #(.N(N)) u_rr (
    .clk, .rst_n,
    .req      (elig_pos),
    .advance  (1'b1),
    .gnt_valid(win_valid),
    .gnt_idx  (win_pos)
  );

  assign win_in = pos_to_in[win_pos];

  always_comb begin
    ev_credit_block = 1'b0;
    for (int i = 0; i < N; i++)
      if (req_cnt[i] != 0 && cred_cnt[dist_cnt[i]] == 0) ev_credit_block = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        req_cnt[i]  <= '0;
        dist_cnt[i] <= '0;
      end
      for (int k = 0; k < M; k++) cred_cnt[k] <= KW'(XP_DEPTH);
      gnt_valid <= 1'b0;
      gnt_src   <= '0;
      gnt_route <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        req_cnt[i] <= req_cnt[i] + CW'(req_inc[i])
                    - CW'((win_valid && int'(win_in) == i));
      end
      for (int k = 0; k < M; k++) begin
        cred_cnt[k] <= cred_cnt[k]
                     + KW'((ecred.valid && int'(ecred.route) == k))
                     - KW'((win_valid && int'(dist_cnt[win_in]) == k));
      end
      if (win_valid)
        dist_cnt[win_in] <= (int'(dist_cnt[win_in]) == M - 1) ? '0 : dist_cnt[win_in] + 1'b1;
      gnt_valid <= win_valid;
      gnt_src   <= win_in;
      gnt_route <= route_t'(dist_cnt[win_in]);
    end
  end

  initial begin
    assert ((N & (N - 1)) == 0 && N >= 2) else $fatal(1, "output_arbiter: N must be a power of two");
    assert (N <= (1 << PORT_W) && M <= (1 << ROUTE_W)) else $fatal(1, "output_arbiter: N or M too large");
  end
  for (genvar i = 0; i < N; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) !(req_inc[i] && int'(req_cnt[i]) == U))
      else $error("output_arbiter: request counter overflow, more than U outstanding");
  end
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(ecred.valid && int'(cred_cnt[ecred.route]) == XP_DEPTH))
    else $error("output_arbiter: credit returned beyond crosspoint size");
endmodule
