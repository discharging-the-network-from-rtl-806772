// tb_ingress_adapter: self-checking test of one ingress adapter.
//
// 4 outputs, 2 B switches, U = 2, 2-packet A crosspoints, 4-packet VOQs.
// The testbench plays the host, the scheduler and the A switch. It pushes
// packets with random destinations, grants requests after a random delay,
// and returns A-stage credits after a random delay (slowly in one phase).
// For every injected packet it checks source, destination, payload (VOQ
// order), per-flow sequence number and route (the distribution pointer
// 0,1,0,1,...); it checks that a flow never has more than U requests
// pending, that no packet leaves without a grant or an A credit, that the
// throttling and link-stall events occur, and that all packets leave.
module tb_ingress_adapter;
  import fc_pkg::*;
  localparam int N = 4, M = 2, U = 2, XP = 2, VQ = 4, ID = 5;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  port_t in_dst;
  payload_t in_payload;
  req_t req;
  gnt_t gnt;
  pkt_t out_pkt;
  hcred_t hcred;
  logic ev_req_throttled, ev_link_stall;
  int checks = 0, failures = 0;
  int pend[N], avail[N], dptr_m[N], seqn[N], acr[M], sent, rcvd, thr, stl;
  payload_t voq_model[N][$];
  int gnt_q[$];      // flows to grant
  int cred_q[$];     // routes to credit back
  bit slow_credits;

  port_t adapter_id;
  assign adapter_id = port_t'(ID);
  ingress_adapter #(.N(N), .M(M), .U(U), .XP_DEPTH(XP), .VOQ_DEPTH(VQ)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin voq_model[in_dst[1:0]].push_back(in_payload); sent++; end
    if (req.valid) begin
      pend[req.dst[1:0]]++;
      chk(pend[req.dst[1:0]] <= U, "more than U requests pending");
      gnt_q.push_back(int'(req.dst));
    end
    if (gnt.valid) begin pend[gnt.dst[1:0]]--; avail[gnt.dst[1:0]]++; end
    if (hcred.valid) acr[hcred.idx]++;
    if (out_pkt.valid) begin
      int j;
      j = int'(out_pkt.dst);
      rcvd++;
      chk(j < N && avail[j] > 0, "packet injected without a grant");
      avail[j]--;
      chk(out_pkt.src == port_t'(ID), "wrong source id");
      chk(voq_model[j].size() > 0 && out_pkt.payload == voq_model[j][0], "payload out of VOQ order");
      if (voq_model[j].size() > 0) void'(voq_model[j].pop_front());
      chk(int'(out_pkt.seq) == seqn[j], "wrong sequence number");
      chk(int'(out_pkt.route) == dptr_m[j], "route does not follow the distribution pointer");
      chk(acr[out_pkt.route] > 0, "packet injected without an A-stage credit");
      acr[out_pkt.route]--;
      seqn[j] = (seqn[j] + 1) % 256;
      dptr_m[j] = (dptr_m[j] + 1) % M;
      cred_q.push_back(int'(out_pkt.route));
    end
    if (ev_req_throttled) thr++;
    if (ev_link_stall) stl++;
  end

  initial begin
    #400000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sent = 0; rcvd = 0; thr = 0; stl = 0; slow_credits = 0;
    for (int j = 0; j < N; j++) begin pend[j] = 0; avail[j] = 0; dptr_m[j] = 0; seqn[j] = 0; end
    for (int k = 0; k < M; k++) acr[k] = XP;
    in_valid = 0; in_dst = '0; in_payload = '0; gnt = '0; hcred = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      slow_credits = (t > 600 && t < 1000);
      in_valid   = (t < 1600) && ($urandom % 3 != 0);
      in_dst     = port_t'($urandom % N);
      in_payload = payload_t'($urandom);
      gnt = '0;
      if (gnt_q.size() > 0 && ($urandom % 4 != 0)) gnt = '{valid: 1'b1, dst: port_t'(gnt_q.pop_front())};
      hcred = '0;
      if (cred_q.size() > 0 && ($urandom % (slow_credits ? 8 : 2) == 0))
        hcred = '{valid: 1'b1, idx: route_t'(cred_q.pop_front())};
    end
    in_valid = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      gnt = '0; hcred = '0;
      if (gnt_q.size() > 0) gnt = '{valid: 1'b1, dst: port_t'(gnt_q.pop_front())};
      if (cred_q.size() > 0) hcred = '{valid: 1'b1, idx: route_t'(cred_q.pop_front())};
    end
    chk(sent == rcvd, $sformatf("sent %0d injected %0d", sent, rcvd));
    chk(sent > 400, $sformatf("too little traffic: %0d", sent));
    chk(thr > 0, "request throttling never observed");
    chk(stl > 0, "link stall on A credits never observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
