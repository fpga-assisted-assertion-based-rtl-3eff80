// sva_if: synthesized checker for the conditional properties
// "if (expr) p1" (HAS_ELSE = 0) and "if (expr) p1 else p2" (HAS_ELSE = 1).
// It is a plain multiplexer: with expr true the coverage follows p1, with
// expr false it follows p2, or is 0 when there is no else branch, as the
// platform's operator table gives it.
// Timing: purely combinational, no clock.
// Interface: expr, p1_out, p2_out (ignored without else), op_i.
module sva_if #(
  parameter bit HAS_ELSE = 1'b1
) (
  input  logic expr,
  input  logic p1_out,
  input  logic p2_out,
  output logic op_i
);
  assign op_i = expr ? p1_out : (HAS_ELSE ? p2_out : 1'b0);
endmodule
