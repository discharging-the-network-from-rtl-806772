// tb_egress_adapter: self-checking test of re-sequencing and credit return.
//
// 4 sources, an 8-slot re-sequencing buffer. The testbench admits packets
// of each source in sequence order into a model of the fabric, keeping at
// most 8 uncredited, as the output arbiter's credits would, and delivers
// the admitted packets in random order, as multi-path spraying can. It
// checks that
// packets leave in sequence order per source with the right payload, that
// each departure comes with one end-to-end credit naming the packet's
// route, that an in-order packet on an empty buffer leaves on the next
// cycle, that out-of-order arrivals are seen, and that all packets leave.
module tb_egress_adapter;
  import fc_pkg::*;
  localparam int N = 4, ROB = 8;

  logic clk = 0, rst_n = 0;
  pkt_t in_pkt, out_pkt;
  ecred_t ecred;
  logic ev_reorder;
  logic [$clog2(ROB+1)-1:0] occupancy;
  int checks = 0, failures = 0;
  int nxt[N], sent, rcvd, creds, reord, inflight;

  egress_adapter #(.N(N), .ROB_SIZE(ROB)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic payload_t pay(int s, int q);
    return payload_t'(s * 4096 + q);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (out_pkt.valid) begin
      int s;
      s = int'(out_pkt.src);
      rcvd++;
      chk(int'(out_pkt.seq) == nxt[s] % 256, "out of sequence");
      chk(out_pkt.payload == pay(s, nxt[s]), "wrong payload");
      chk(ecred.valid && ecred.route == out_pkt.route, "credit missing or wrong route");
      nxt[s]++;
    end else chk(!ecred.valid, "credit without departure");
    if (ecred.valid) begin creds++; inflight--; end
    if (ev_reorder) reord++;
  end

  initial begin
    #600000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_t p;
    pkt_t fly[$];       // granted packets inside the fabric, any arrival order
    int gen[N];
    sent = 0; rcvd = 0; creds = 0; reord = 0; inflight = 0;
    in_pkt = '0;
    for (int s = 0; s < N; s++) begin nxt[s] = 0; gen[s] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // single in-order packet: must leave on the next cycle
    p = '0;
    p.valid = 1'b1; p.src = '0; p.seq = '0; p.route = '0; p.payload = pay(0, 0);
    gen[0] = 1;
    @(negedge clk) in_pkt = p;
    sent++; inflight++;
    @(negedge clk) in_pkt = '0;
    chk(out_pkt.valid && out_pkt.seq == 0, "in-order packet not forwarded next cycle");
    // a packet is granted (enters the fabric) in sequence order while fewer
    // than ROB are uncredited; the fabric delivers the granted ones in
    // random order
    for (int t = 0; t < 8000 && sent < N * 400; t++) begin
      int s;
      @(negedge clk);
      s = int'($urandom % N);
      if (inflight + fly.size() < ROB && gen[s] < 400) begin
        p = '0;
        p.valid = 1'b1; p.src = port_t'(s);
        p.seq = seq_t'(gen[s] % 256);
        p.route = route_t'(gen[s] % 2);
        p.payload = pay(s, gen[s]);
        fly.push_back(p);
        gen[s]++;
      end
      in_pkt = '0;
      if (fly.size() > 0 && ($urandom % 4 != 0)) begin
        int k;
        k = int'($urandom % fly.size());
        in_pkt = fly[k];
        fly.delete(k);
        sent++; inflight++;
      end
    end
    @(negedge clk) in_pkt = '0;
    repeat (20) @(negedge clk);
    chk(sent == N * 400, $sformatf("sent only %0d", sent));
    chk(rcvd == sent && creds == sent, $sformatf("sent %0d received %0d credits %0d", sent, rcvd, creds));
    chk(reord > 0, "no out-of-order arrival exercised");
    chk(occupancy == 0, "buffer not empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
