// tb_central_scheduler: self-checking test of the central scheduler.
//
// 4 ports, 2 B switches, 2-packet crosspoints, U = 4. The testbench plays
// the adapters: it issues requests (keeping at most U pending per flow),
// checks that each grant reaching adapter i names a flow with a pending
// request, and returns end-to-end credits for the reserved crosspoints after
// a random delay. It checks the request-to-grant latency on an idle
// scheduler, that an output never has more than XP_DEPTH packets reserved
// per crosspoint, that a hotspot output is limited by its credits while
// other outputs keep being granted, and that all requests are granted.
module tb_central_scheduler;
  import fc_pkg::*;
  localparam int N = 4, M = 2, XP = 2, U = 4;
  localparam int LAT = 4;   // request valid -> grant valid at adapter, cycles

  logic clk = 0, rst_n = 0;
  req_t   req   [N];
  ecred_t ecred [N];
  gnt_t   gnt   [N];
  logic [N-1:0] oa_grant_valid;
  route_t oa_grant_route [N];
  logic [N-1:0] ev_credit_block, ev_serialize;
  int checks = 0, failures = 0;
  int pr[N][N], resv[N][M], total_req, total_gnt, cyc, blk, ser;
  int ret_q[N][$];   // routes to return per output

  central_scheduler #(.N(N), .M(M), .XP_DEPTH(XP), .U(U)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      for (int i = 0; i < N; i++) if (gnt[i].valid) begin
        chk(pr[i][gnt[i].dst[1:0]] > 0, "grant without pending request");
        pr[i][gnt[i].dst[1:0]]--; total_gnt++;
      end
      for (int j = 0; j < N; j++) if (oa_grant_valid[j]) begin
        resv[j][oa_grant_route[j]]++;
        chk(resv[j][oa_grant_route[j]] <= XP, "crosspoint over-reserved");
        ret_q[j].push_back(int'(oa_grant_route[j]));
      end
      for (int j = 0; j < N; j++) if (ecred[j].valid) resv[j][ecred[j].route]--;
      for (int i = 0; i < N; i++) if (req[i].valid) begin pr[i][req[i].dst[1:0]]++; total_req++; end
      if (|ev_credit_block) blk++;
      if (|ev_serialize) ser++;
    end
  end

  initial begin
    #400000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, hot_ret_cnt;
    bit slow_hot;
    cyc = 0; total_req = 0; total_gnt = 0; blk = 0; ser = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) pr[i][j] = 0;
    for (int j = 0; j < N; j++) for (int k = 0; k < M; k++) resv[j][k] = 0;
    for (int i = 0; i < N; i++) begin req[i] = '0; ecred[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency on an idle scheduler
    @(negedge clk) req[1] = '{valid: 1'b1, dst: port_t'(2)};
    t0 = cyc;
    @(negedge clk) req[1] = '0;
    while (total_gnt == 0 && cyc < t0 + 20) @(negedge clk);
    chk(cyc - t0 - 1 == LAT, $sformatf("grant latency %0d cycles, expected %0d", cyc - t0 - 1, LAT));
    // drain the credit
    @(negedge clk) ecred[2] = '{valid: 1'b1, route: route_t'(ret_q[2].pop_front())};
    @(negedge clk) ecred[2] = '0;
    // traffic: all inputs hammer output 0 (hotspot), plus uniform requests
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        int j;
        j = ($urandom % 2 == 0) ? 0 : int'($urandom % N);
        req[i] = '0;
        if (t < 1200 && pr[i][j] < U) req[i] = '{valid: 1'b1, dst: port_t'(j)};
      end
      // credits return; output 0 returns slowly (an oversubscribed output)
      for (int j = 0; j < N; j++) begin
        ecred[j] = '0;
        slow_hot = (j == 0) && ($urandom % 4 != 0);
        if (ret_q[j].size() > 0 && !slow_hot && ($urandom % 2 == 0))
          ecred[j] = '{valid: 1'b1, route: route_t'(ret_q[j].pop_front())};
      end
    end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) req[i] = '0;
      for (int j = 0; j < N; j++) begin
        ecred[j] = '0;
        if (ret_q[j].size() > 0) ecred[j] = '{valid: 1'b1, route: route_t'(ret_q[j].pop_front())};
      end
    end
    hot_ret_cnt = 0;
    chk(total_req == total_gnt, $sformatf("requests %0d grants %0d", total_req, total_gnt));
    chk(total_req > 1000, "too little traffic");
    chk(blk > 0, "credit blocking at the hotspot never observed");
    chk(ser > 0, "grant serialization never observed");
    for (int j = 0; j < N; j++) for (int k = 0; k < M; k++) chk(resv[j][k] == 0, "reservations left");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
