// tb_clos_fabric_central: end-to-end test of the fabric with central
// scheduler, at a reduced size (16 ports of 4x4 switches, 3-packet
// crosspoints, U = 8, 16-packet VOQs, 64-slot re-sequencing buffers) so
// that congestion mechanisms trigger quickly.
//
// Every input offers traffic in three phases: uniform random destinations,
// then a hotspot phase in which most packets of every input go to outputs
// 0 and 1 (oversubscribed several times) while the rest stay uniform, and
// a drain phase. A scoreboard keeps every accepted packet per flow and
// checks that each one leaves exactly once, at its own destination, in
// order per flow, with its payload intact. It measures the delivered
// non-hotspot traffic during the hotspot phase (it must keep flowing: the
// congested flows must not block the others), the smallest end-to-end
// latency, and it counts the fabric's mechanisms: request throttling,
// credit blocking at an output arbiter, grant serialization, input-link
// stalls on A-stage credits, A-stage hop-by-hop backpressure and
// out-of-order arrival at an egress adapter. A mechanism that never acts
// counts as a failure, except A-stage backpressure, which the scheme
// expects to be rare; it is reported.
module tb_clos_fabric_central;
  import fc_pkg::*;
  localparam int M = 2, N = M * M, XP = 3, U = 8, VQ = 16, ROB = 32;
  localparam int CYC = 6000;

  logic clk = 0, rst_n = 0;
  logic     in_valid   [N];
  port_t    in_dst     [N];
  payload_t in_payload [N];
  logic     in_ready   [N];
  pkt_t     out_pkt    [N];
  logic [N-1:0] ev_req_throttled, ev_link_stall, ev_reorder, ev_credit_block, ev_serialize;
  logic [M-1:0] ev_bp_stall_a;

  clos_fabric_central #(.M(M), .XP_DEPTH(XP), .U(U), .VOQ_DEPTH(VQ), .ROB_SIZE(ROB)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0, accepted = 0, delivered = 0, min_lat = 1 << 30;
  int n_thr = 0, n_blk = 0, n_ser = 0, n_lstall = 0, n_bp = 0, n_reord = 0;
  int bg_offered_hot = 0, bg_delivered_hot = 0;
  bit hot_phase = 0;
  payload_t sb   [N][N][$];   // [src][dst] payloads in order
  int       tin  [N][N][$];   // acceptance cycle
  int       next_pl = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      for (int i = 0; i < N; i++)
        if (in_valid[i] && in_ready[i]) begin
          sb[i][in_dst[i]].push_back(in_payload[i]);
          tin[i][in_dst[i]].push_back(cyc);
          accepted++;
          if (hot_phase && int'(in_dst[i]) >= 2) bg_offered_hot++;
        end
      for (int j = 0; j < N; j++)
        if (out_pkt[j].valid) begin
          int s;
          s = int'(out_pkt[j].src);
          delivered++;
          chk(int'(out_pkt[j].dst) == j, "packet left on the wrong output");
          chk(sb[s][j].size() > 0 && sb[s][j][0] == out_pkt[j].payload,
              $sformatf("flow %0d->%0d: lost, duplicated or out of order", s, j));
          if (sb[s][j].size() > 0) begin
            void'(sb[s][j].pop_front());
            if (cyc - tin[s][j][0] < min_lat) min_lat = cyc - tin[s][j][0];
            void'(tin[s][j].pop_front());
          end
          if (hot_phase && j >= 2) bg_delivered_hot++;
        end
      if (|ev_req_throttled) n_thr++;
      if (|ev_credit_block)  n_blk++;
      if (|ev_serialize)     n_ser++;
      if (|ev_link_stall)    n_lstall++;
      if (|ev_bp_stall_a)    n_bp++;
      if (|ev_reorder)       n_reord++;
    end
  end

  initial begin
    #2000000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int remaining;
    for (int i = 0; i < N; i++) begin in_valid[i] = 0; in_dst[i] = '0; in_payload[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < CYC; t++) begin
      @(negedge clk);
      hot_phase = (t >= CYC / 3) && (t < 2 * CYC / 3);
      for (int i = 0; i < N; i++) begin
        int d;
        if (hot_phase && ($urandom % 100 < 40)) d = int'($urandom % 2);
        else if (hot_phase) d = 2 + int'($urandom % (N - 2));
        else d = int'($urandom % N);
        in_valid[i]   = (t < 5 * CYC / 6) && ($urandom % 100 < 70);
        in_dst[i]     = port_t'(d);
        in_payload[i] = payload_t'(next_pl++);
      end
    end
    for (int i = 0; i < N; i++) in_valid[i] = 0;
    // drain
    remaining = 1;
    for (int t = 0; t < 20 * CYC && remaining > 0; t++) begin
      @(negedge clk);
      remaining = accepted - delivered;
    end
    repeat (10) @(negedge clk);
    chk(accepted == delivered, $sformatf("accepted %0d delivered %0d", accepted, delivered));
    chk(accepted > CYC * N / 4, $sformatf("too little traffic accepted: %0d", accepted));
    chk(bg_delivered_hot * 10 >= bg_offered_hot * 9,
        $sformatf("non-hotspot traffic held back during hotspots: offered %0d delivered %0d",
                  bg_offered_hot, bg_delivered_hot));
    chk(n_thr > 0,    "request throttling never happened");
    chk(n_blk > 0,    "output-arbiter credit blocking never happened");
    chk(n_ser > 0,    "grant serialization never happened");
    chk(n_lstall > 0, "input-link stall on A-stage credits never happened");
    chk(n_reord > 0,  "out-of-order arrival never happened");
    $display("accepted=%0d delivered=%0d min_latency=%0d cycles", accepted, delivered, min_lat);
    $display("events: throttle=%0d credit_block=%0d serialize=%0d link_stall=%0d a_backpressure=%0d reorder=%0d",
             n_thr, n_blk, n_ser, n_lstall, n_bp, n_reord);
    $display("background during hotspots: offered=%0d delivered=%0d", bg_offered_hot, bg_delivered_hot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
