// tb_xbar_switch: self-checking test of the buffered crossbar element.
//
// Two 4x4 instances with 3-packet crosspoints. The A-stage instance is
// driven by a credit-respecting upstream model on every input and drained
// by a downstream model that holds 2-packet crosspoints and returns credits
// after a random delay (slowly in one phase, to force backpressure). The
// testbench checks that each packet leaves on the output named by its
// route, in order per (input, output) pair, that no output sends without a
// downstream credit, that upstream credits never exceed the crosspoint
// size, that backpressure stalls happen, and that every packet arrives.
// The C-stage instance, fed without flow control at a safe rate, must send
// each packet to output dst mod M and return no credits.
module tb_xbar_switch;
  import fc_pkg::*;
  localparam int M = 4, XP = 3, DS = 2;

  logic clk = 0, rst_n = 0;
  pkt_t   a_in [M], a_out [M], c_in [M], c_out [M];
  hcred_t a_ci [M], a_co [M], c_ci [M], c_co [M];
  logic   a_ev, c_ev;
  int checks = 0, failures = 0;
  int up[M][M], dsc[M][M], sent, rcvd, c_sent, c_rcvd, stalls;
  payload_t exp_q[M][M][$];      // [input][output]
  payload_t c_exp[M][$];         // C stage, per output (one input used)
  int ret_q[M][$];               // per output: downstream crosspoint to credit
  int pl;
  bit slow;

  xbar_switch #(.M(M), .XP_DEPTH(XP), .DS_DEPTH(DS), .STAGE(0)) dut_a (
    .clk, .rst_n, .in_pkt(a_in), .out_pkt(a_out), .hcred_in(a_ci), .hcred_out(a_co), .ev_bp_stall(a_ev));
  xbar_switch #(.M(M), .XP_DEPTH(XP), .DS_DEPTH(DS), .STAGE(2)) dut_c (
    .clk, .rst_n, .in_pkt(c_in), .out_pkt(c_out), .hcred_in(c_ci), .hcred_out(c_co), .ev_bp_stall(c_ev));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < M; p++) begin
      if (a_in[p].valid) begin
        exp_q[p][a_in[p].route].push_back(a_in[p].payload); sent++;
      end
      if (a_co[p].valid) begin
        up[p][a_co[p].idx]++;
        chk(up[p][a_co[p].idx] <= XP, "upstream credit beyond crosspoint size");
      end
      if (c_in[p].valid) begin c_exp[int'(c_in[p].dst) % M].push_back(c_in[p].payload); c_sent++; end
      chk(!c_co[p].valid, "C stage returned a hop-by-hop credit");
    end
    for (int q = 0; q < M; q++) begin
      if (a_ci[q].valid) dsc[q][a_ci[q].idx]++;
      if (a_out[q].valid) begin
        int p, k;
        p = int'(a_out[q].src);
        k = int'(a_out[q].dst) / M;
        rcvd++;
        chk(int'(a_out[q].route) == q, "A stage: packet on wrong output");
        chk(exp_q[p][q].size() > 0 && exp_q[p][q][0] == a_out[q].payload, "A stage: order broken");
        if (exp_q[p][q].size() > 0) void'(exp_q[p][q].pop_front());
        chk(dsc[q][k] > 0, "A stage: sent without downstream credit");
        dsc[q][k]--;
        ret_q[q].push_back(k);
      end
      if (c_out[q].valid) begin
        c_rcvd++;
        chk(int'(c_out[q].dst) % M == q, "C stage: packet on wrong output");
        chk(c_exp[q].size() > 0 && c_exp[q][0] == c_out[q].payload, "C stage: order broken");
        if (c_exp[q].size() > 0) void'(c_exp[q].pop_front());
      end
    end
    if (a_ev) stalls++;
  end

  initial begin
    #600000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sent = 0; rcvd = 0; c_sent = 0; c_rcvd = 0; stalls = 0; pl = 0;
    for (int p = 0; p < M; p++) for (int q = 0; q < M; q++) begin up[p][q] = XP; dsc[p][q] = DS; end
    for (int p = 0; p < M; p++) begin a_in[p] = '0; a_ci[p] = '0; c_in[p] = '0; c_ci[p] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2500; t++) begin
      @(negedge clk);
      slow = (t > 800 && t < 1400);
      for (int p = 0; p < M; p++) begin
        int q;
        q = int'($urandom % M);
        a_in[p] = '0;
        if (t < 2200 && up[p][q] > 0 && ($urandom % 2 == 0)) begin
          a_in[p].valid   = 1'b1;
          a_in[p].src     = port_t'(p);
          a_in[p].dst     = port_t'($urandom % (M * M));
          a_in[p].route   = route_t'(q);
          a_in[p].payload = payload_t'(pl++);
          up[p][q]--;
        end
      end
      for (int q = 0; q < M; q++) begin
        a_ci[q] = '0;
        if (ret_q[q].size() > 0 && ($urandom % (slow ? 10 : 2) == 0))
          a_ci[q] = '{valid: 1'b1, idx: route_t'(ret_q[q].pop_front())};
      end
      // C stage: only input (t mod M) sends, so no crosspoint can overflow
      for (int p = 0; p < M; p++) c_in[p] = '0;
      if (t < 2200) begin
        int p;
        p = t % M;
        c_in[p].valid = 1'b1;
        c_in[p].src = port_t'(p);
        c_in[p].dst = port_t'($urandom % (M * M));
        c_in[p].payload = payload_t'(t);
      end
    end
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int p = 0; p < M; p++) begin a_in[p] = '0; c_in[p] = '0; end
      for (int q = 0; q < M; q++) begin
        a_ci[q] = '0;
        if (ret_q[q].size() > 0) a_ci[q] = '{valid: 1'b1, idx: route_t'(ret_q[q].pop_front())};
      end
    end
    chk(sent == rcvd, $sformatf("A stage: sent %0d received %0d", sent, rcvd));
    chk(c_sent == c_rcvd, $sformatf("C stage: sent %0d received %0d", c_sent, c_rcvd));
    chk(sent > 2000, "too little traffic");
    chk(stalls > 0, "backpressure stall never observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
