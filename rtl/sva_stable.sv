// sva_stable: synthesized system function $stable(A): 1 when the W-bit
// value A equals its value one clock earlier. old_a is a register holding
// the previous value; the comparison is combinational.
// Interface: clk, rst_n (asynchronous, active low; old_a resets to 0), a,
// op_i. Timing: op_i(t) = (a(t) == a(t-1)). Follows the platform's operator
// table.
module sva_stable #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  output logic         op_i
);
  logic [W-1:0] old_a;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) old_a <= '0;
    else        old_a <= a;

  assign op_i = (a == old_a);
endmodule
