// input_arbiter: grant serializer for one fabric input i in the central
// scheduler.
//
// Several output arbiters may grant input i in the same packet time. Each
// grant increments the per-flow grant counter i->j of the granting output j;
// non-zero counters are always eligible, and a round-robin arbiter serves
// one of them per cycle, decrementing it and sending one grant (output j)
// to ingress adapter i on the next clock edge. The counters follow the
// scheme; the counter width (grants of a flow never exceed its U outstanding
// requests) and the output register are choices of this RTL.
module input_arbiter
  import fc_pkg::*;
#(
  parameter int unsigned N = 64,
  parameter int unsigned U = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] gnt_inc,   // grant for flow i->j from output arbiter j
  output gnt_t         gnt,       // one grant per cycle to the adapter
  output logic         ev_serialize // grants of several outputs are queued
);
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned CW = $clog2(U + 1);

  logic [CW-1:0] gnt_cnt [N];
  logic [N-1:0]  nz;
  logic          win_valid;
  logic [IW-1:0] win;

  for (genvar j = 0; j < N; j++) begin : g_nz
    assign nz[j] = (gnt_cnt[j] != 0);
  end

  assign ev_serialize = ((nz & (nz - 1'b1)) != 0);   // more than one bit set

  rr_arbiter #(.N(N)) u_rr (
    .clk, .rst_n, .req(nz), .advance(1'b1), .gnt_valid(win_valid), .gnt_idx(win)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) gnt_cnt[j] <= '0;
      gnt <= '0;
    end else begin
      for (int j = 0; j < N; j++)
        gnt_cnt[j] <= gnt_cnt[j] + CW'(gnt_inc[j])
                    - CW'((win_valid && int'(win) == j));
      gnt.valid <= win_valid;
      gnt.dst   <= port_t'(win);
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) !(gnt_inc[j] && int'(gnt_cnt[j]) == U))
      else $error("input_arbiter: grant counter overflow");
  end
endmodule
