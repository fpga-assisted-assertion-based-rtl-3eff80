// sva_delay: synthesized checker for the temporal delay s1 ##[N:M] s2
// (s1 ##N s2 when M = N).
// A shift register of M bits records in which of the last M cycles s1
// occurred: hist[k] is s1 k cycles ago. op_i (coverage) is high when s2
// occurs now and s1 occurred between N and M cycles ago.
// Timing: op_i is combinational from s2_out and the registered history, so
// the match is flagged in the cycle s2 occurs.
// Interface: clk, rst_n (asynchronous, active low), s1_out, s2_out, op_i.
// The shift-register translation follows the platform's operator table; the
// table's extra s2 history (s2 must not have occurred earlier) is not kept:
// every s1/s2 pair at the right distance counts as a match.
module sva_delay #(
  parameter int unsigned N = 1,
  parameter int unsigned M = N
) (
  input  logic clk,
  input  logic rst_n,
  input  logic s1_out,
  input  logic s2_out,
  output logic op_i
);
  logic [M:1] hist;
  logic       window;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) hist <= '0;
    else begin
      hist[1] <= s1_out;
      for (int k = 2; k <= int'(M); k++) hist[k] <= hist[k-1];
    end

  always_comb begin
    window = 1'b0;
    for (int k = int'(N); k <= int'(M); k++) window |= hist[k];
  end

  assign op_i = s2_out && window;

  initial begin
    assert (N >= 1 && M >= N) else $error("sva_delay: need 1 <= N <= M");
  end
endmodule
