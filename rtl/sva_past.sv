// sva_past: synthesized system function $past(A): a W-bit register that
// returns the value A had one clock earlier (0 right after reset).
// Interface: clk, rst_n (asynchronous, active low), a, op_i.
// Timing: op_i(t) = a(t-1). Follows the platform's operator table; the
// width parameter lets one instance delay a whole bus.
module sva_past #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  output logic [W-1:0] op_i
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) op_i <= '0;
    else        op_i <= a;
endmodule
