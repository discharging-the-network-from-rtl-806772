// tb_fabric_workloads: the evaluated traffic patterns, run on a 4-port
// fabric (M = 2) with every other parameter at its default (12-packet
// crosspoints, U = 32, 32-packet VOQs, 300-slot re-sequencing buffers).
//
// 1. Unbalanced saturated traffic. Every input always offers a packet; with
//    probability w it goes to the output of the same index, otherwise to a
//    uniformly chosen output. For w = 0, 0.5 and 1 the delivered throughput
//    per output over 3000 cycles must reach 0.9.
// 2. Sequential fan-in (incast). Background traffic loads the non-hotspot
//    outputs at about 0.5; then each output in turn becomes a hotspot for
//    2000 cycles, with every input also sending to it (aggregate demand 2.4
//    times its capacity). During each episode the hotspot must stay busy at
//    least 90% of the time and the background traffic accepted must be
//    delivered (at least 90% within the episode).
// A scoreboard checks that every packet is delivered once, in order per
// flow, to the right output.
module tb_fabric_workloads;
  import fc_pkg::*;
  localparam int M = 2, N = M * M;

  logic clk = 0, rst_n = 0;
  logic     in_valid   [N];
  port_t    in_dst     [N];
  payload_t in_payload [N];
  logic     in_ready   [N];
  pkt_t     out_pkt    [N];
  logic [N-1:0] ev_req_throttled, ev_link_stall, ev_reorder, ev_credit_block, ev_serialize;
  logic [M-1:0] ev_bp_stall_a;

  clos_fabric_central #(.M(M)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int accepted = 0, delivered = 0, next_pl = 0;
  int out_cnt [N];
  int hot = -1, bg_acc = 0, bg_del = 0;
  payload_t sb [N][N][$];

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++)
      if (in_valid[i] && in_ready[i]) begin
        sb[i][in_dst[i]].push_back(in_payload[i]);
        accepted++;
        if (hot >= 0 && int'(in_dst[i]) != hot) bg_acc++;
      end
    for (int j = 0; j < N; j++)
      if (out_pkt[j].valid) begin
        int s;
        s = int'(out_pkt[j].src);
        delivered++;
        out_cnt[j]++;
        if (hot >= 0 && j != hot) bg_del++;
        chk(int'(out_pkt[j].dst) == j && sb[s][j].size() > 0 && sb[s][j][0] == out_pkt[j].payload,
            $sformatf("flow %0d->%0d: lost, misrouted or out of order", s, j));
        if (sb[s][j].size() > 0) void'(sb[s][j].pop_front());
      end
  end

  initial begin
    #3000000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle_drain();
    for (int i = 0; i < N; i++) in_valid[i] = 0;
    for (int t = 0; t < 5000 && accepted != delivered; t++) @(negedge clk);
    chk(accepted == delivered, $sformatf("not drained: accepted %0d delivered %0d", accepted, delivered));
  endtask

  initial begin
    int wl[3];
    wl = '{0, 50, 100};
    for (int i = 0; i < N; i++) begin in_valid[i] = 0; in_dst[i] = '0; in_payload[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. unbalanced saturated traffic
    foreach (wl[w]) begin
      for (int t = 0; t < 4000; t++) begin
        @(negedge clk);
        if (t == 1000) for (int j = 0; j < N; j++) out_cnt[j] = 0;
        for (int i = 0; i < N; i++) begin
          in_valid[i]   = 1'b1;
          in_dst[i]     = port_t'((int'($urandom % 100) < wl[w]) ? i : int'($urandom % N));
          in_payload[i] = payload_t'(next_pl++);
        end
      end
      begin
        int tot;
        tot = 0;
        for (int j = 0; j < N; j++) tot += out_cnt[j];
        $display("unbalanced w=%0d%%: throughput %0d.%03d", wl[w], tot / (N * 3000),
                 (tot * 1000 / (N * 3000)) % 1000);
        chk(tot * 10 >= N * 3000 * 9, $sformatf("w=%0d%%: throughput below 0.9 (%0d packets)", wl[w], tot));
      end
      idle_drain();
    end
    // 2. sequential fan-in
    for (int h = 0; h < N; h++) begin
      for (int t = 0; t < 2500; t++) begin
        @(negedge clk);
        if (t == 500) begin
          for (int j = 0; j < N; j++) out_cnt[j] = 0;
          hot = h; bg_acc = 0; bg_del = 0;
        end
        for (int i = 0; i < N; i++) begin
          int d, r;
          r = int'($urandom % 1000);
          d = int'($urandom % (N - 1));
          if (d >= h) d++;
          in_valid[i] = 1'b0;
          if (t >= 500 && r < 600) begin
            in_valid[i] = 1'b1; in_dst[i] = port_t'(h);
          end else if (r >= 600 && r < 600 + 375) begin
            in_valid[i] = 1'b1; in_dst[i] = port_t'(d);
          end
          in_payload[i] = payload_t'(next_pl++);
        end
      end
      $display("incast hotspot %0d: hotspot busy %0d/2000, background accepted %0d delivered %0d",
               h, out_cnt[h], bg_acc, bg_del);
      chk(out_cnt[h] * 10 >= 2000 * 9, $sformatf("hotspot %0d under-utilized: %0d/2000", h, out_cnt[h]));
      chk(bg_del * 10 >= bg_acc * 9, $sformatf("background held back during hotspot %0d", h));
      hot = -1;
    end
    idle_drain();
    chk(accepted > 50000, "too little traffic");
    $display("accepted=%0d delivered=%0d", accepted, delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
