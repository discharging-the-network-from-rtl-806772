// tb_input_arbiter: self-checking test of the grant serializer.
//
// Four outputs grant the same input, often in the same cycle. The testbench
// counts grants in per output and grants out per output, and checks that
// at most one grant leaves per cycle, that it never names an output with
// nothing queued, that all grants come out, that a burst of k simultaneous
// grants takes k cycles to drain, and that the serializing event is seen.
module tb_input_arbiter;
  import fc_pkg::*;
  localparam int N = 4, U = 8;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] gnt_inc;
  gnt_t gnt;
  logic ev_serialize;
  int checks = 0, failures = 0;
  int q[N], total_in, total_out, ser_seen;

  input_arbiter #(.N(N), .U(U)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (gnt.valid) begin
      chk(q[gnt.dst[1:0]] > 0, "grant for an output with nothing queued");
      q[gnt.dst[1:0]]--; total_out++;
    end
    for (int j = 0; j < N; j++) if (gnt_inc[j]) begin q[j]++; total_in++; end
    if (ev_serialize) ser_seen++;
  end

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start;
    for (int j = 0; j < N; j++) q[j] = 0;
    total_in = 0; total_out = 0; ser_seen = 0; gnt_inc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // burst: all four outputs grant at once
    @(negedge clk) gnt_inc = '1;
    @(negedge clk) gnt_inc = '0;
    start = total_out;
    // counter update, then one grant per cycle from the next edge on
    repeat (2) @(negedge clk);
    chk(total_out - start == 1, $sformatf("first grant after two edges, got %0d", total_out - start));
    repeat (3) @(negedge clk);
    chk(total_out - start == N, $sformatf("burst of %0d should drain one per cycle, got %0d", N, total_out - start));
    // random traffic, bounded so no counter exceeds U
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int j = 0; j < N; j++) gnt_inc[j] = (q[j] < U - 2) && ($urandom % 3 == 0);
    end
    @(negedge clk) gnt_inc = '0;
    repeat (40) @(negedge clk);
    chk(total_in == total_out, $sformatf("grants in %0d out %0d", total_in, total_out));
    chk(total_in > 100, "too few grants exercised");
    chk(ser_seen > 0, "serialization never observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
