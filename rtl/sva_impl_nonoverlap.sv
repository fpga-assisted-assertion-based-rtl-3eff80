// sva_impl_nonoverlap: synthesized checker for the non-overlapping
// implication s1 |=> p1: when s1 occurs, p1 must hold one clock later.
// s1_prev holds s1 of the previous cycle; op_i (registered coverage) is
// !s1_prev || p1, so it is 0 one clock after a cycle in which p1 was missing
// after s1. Inverting op_i gives the assertion result (1 = failed).
// Interface: clk, rst_n (asynchronous, active low; op_i resets to 1),
// s1_out, p1_out, op_i. Timing: s1 at cycle t, p1 checked at t+1, op_i
// valid at t+2. Registered form follows the platform's operator table.
module sva_impl_nonoverlap (
  input  logic clk,
  input  logic rst_n,
  input  logic s1_out,
  input  logic p1_out,
  output logic op_i
);
  logic s1_prev;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s1_prev <= 1'b0;
      op_i    <= 1'b1;
    end else begin
      s1_prev <= s1_out;
      op_i    <= !s1_prev || p1_out;
    end
endmodule
