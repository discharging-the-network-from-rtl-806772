// rr_arbiter: round-robin arbiter over N requesters.
//
// Combinationally picks the first asserted request at or after the pointer
// (wrapping), and reports it as an index with a valid flag. When `advance`
// is high and a grant is given, the pointer moves to one past the winner on
// the next clock edge, so a served requester becomes lowest priority. This
// is the round-robin discipline used by every arbiter of the fabric.
// Reset puts the pointer at 0.
module rr_arbiter #(
  parameter int unsigned N = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic                 gnt_valid,
  output logic [$clog2(N)-1:0] gnt_idx
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;

  always_comb begin
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned c;
      c = (int'(ptr) + k) % N;
      if (!gnt_valid && req[c]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IW'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && gnt_valid) ptr <= (int'(gnt_idx) == N - 1) ? '0 : gnt_idx + 1'b1;
  end
endmodule
