// tb_output_arbiter: self-checking test of one output arbiter.
//
// Small configuration: 4 inputs, 2 B switches, 2-packet crosspoints, at most
// 4 outstanding requests per flow. A reference model in the testbench keeps
// its own request counts, credit counts and per-input distribution pointers.
// It checks that every grant names an input with outstanding requests, the
// route the model's pointer predicts, and a crosspoint with a free credit;
// that grants stop when all M*XP_DEPTH credits are used; that they resume
// when end-to-end credits return; and that every request is granted.
module tb_output_arbiter;
  import fc_pkg::*;
  localparam int N = 4, M = 2, XP = 2, U = 4;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] req_inc;
  ecred_t ecred;
  logic gnt_valid;
  logic [1:0] gnt_src;
  route_t gnt_route;
  logic ev_credit_block;
  int checks = 0, failures = 0;
  int m_req[N], m_dist[N], m_cred[M], granted, requested, blocked_seen;

  port_t out_id;
  assign out_id = port_t'(3);
  output_arbiter #(.N(N), .M(M), .XP_DEPTH(XP), .U(U)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // model update on every clock edge, after comparing the grant
  always @(posedge clk) if (rst_n) begin
    if (gnt_valid) begin
      chk(m_req[gnt_src] > 0, "grant to input without requests");
      chk(int'(gnt_route) == m_dist[gnt_src], "grant route differs from distribution pointer");
      chk(m_cred[gnt_route] > 0, "grant without crosspoint credit");
      m_req[gnt_src]--;
      m_cred[gnt_route]--;
      m_dist[gnt_src] = (m_dist[gnt_src] + 1) % M;
      granted++;
    end
    for (int i = 0; i < N; i++) if (req_inc[i]) begin m_req[i]++; requested++; end
    if (ecred.valid) m_cred[ecred.route]++;
    if (ev_credit_block) blocked_seen++;
  end

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin m_req[i] = 0; m_dist[i] = 0; end
    for (int k = 0; k < M; k++) m_cred[k] = XP;
    granted = 0; requested = 0; blocked_seen = 0;
    req_inc = '0; ecred = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: every input asks for 4 credits, no credits return
    for (int r = 0; r < U; r++) begin
      @(negedge clk) req_inc = '1;
    end
    @(negedge clk) req_inc = '0;
    repeat (20) @(negedge clk);
    chk(granted == M * XP, $sformatf("expected %0d grants with no credit return, got %0d", M * XP, granted));
    chk(blocked_seen > 0, "credit blocking never observed");
    // phase 2: return credits one per cycle for the routes granted, until all served
    for (int t = 0; t < 400 && granted < N * U; t++) begin
      @(negedge clk);
      ecred = '0;
      for (int k = 0; k < M; k++)
        if (m_cred[k] < XP && !ecred.valid && ($urandom % 2 == 0)) begin
          ecred.valid = 1; ecred.route = route_t'(k);
        end
    end
    @(negedge clk) ecred = '0;
    repeat (5) @(negedge clk);
    chk(granted == N * U, $sformatf("all %0d requests should be granted, got %0d", N * U, granted));
    for (int i = 0; i < N; i++) chk(m_req[i] == 0, "requests left");
    for (int i = 0; i < N; i++) chk(m_dist[i] == (U % M), "distribution pointer end state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
