// sva_intersect: synthesized checker for s1 intersect s2.
// Both sequences must start together and match in the same cycle.
// match_start remembers that both started in the same cycle and clears when
// neither sequence is in progress (s1_off and s2_off, level signals). op_i is
// registered: it is high the cycle after s1 and s2 match together while
// match_start is set.
// Interface: clk, rst_n (asynchronous, active low), s1_on/out/off,
// s2_on/out/off, op_i. Structure follows the platform's operator table.
// Consequence of the registered match_start: a start and a common match in
// the very same cycle is not seen; sequences must span two cycles or more.
module sva_intersect (
  input  logic clk,
  input  logic rst_n,
  input  logic s1_on,
  input  logic s1_out,
  input  logic s1_off,
  input  logic s2_on,
  input  logic s2_out,
  input  logic s2_off,
  output logic op_i
);
  logic match_start;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                  match_start <= 1'b0;
    else if (s1_off && s2_off)   match_start <= 1'b0;
    else if (s1_on && s2_on)     match_start <= 1'b1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) op_i <= 1'b0;
    else        op_i <= s1_out && s2_out && match_start;
endmodule
