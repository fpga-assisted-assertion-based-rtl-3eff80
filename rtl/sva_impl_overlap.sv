// sva_impl_overlap: synthesized checker for the overlapping implication
// s1 |-> p1. The coverage op_i is registered: in the cycle after the check
// it is 1 when the antecedent s1 did not occur (vacuous success) or the
// consequent p1 held in the same cycle as s1, and 0 when s1 occurred
// without p1. Inverting op_i gives the assertion result (1 = failed).
// Interface: clk, rst_n (asynchronous, active low; op_i resets to 1),
// s1_out, p1_out, op_i. Timing: one clock from the checked cycle to op_i.
// Registered form follows the platform's operator table; the vacuous-success
// reading (!s1 || p1) is this design's reading of it.
module sva_impl_overlap (
  input  logic clk,
  input  logic rst_n,
  input  logic s1_out,
  input  logic p1_out,
  output logic op_i
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) op_i <= 1'b1;
    else        op_i <= !s1_out || p1_out;
endmodule
