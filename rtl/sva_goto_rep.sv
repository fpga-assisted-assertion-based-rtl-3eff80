// sva_goto_rep: synthesized checker for the goto repetition s1[->N:M].
// A counter of $clog2(M+1) bits counts occurrences of s1 that need not be
// consecutive: cycles without s1 leave the count unchanged. op_i (coverage)
// is high in the cycle of the N-th up to the M-th occurrence. After the M-th
// occurrence the counter restarts, so the next occurrence is the first again.
// Timing: op_i is combinational from s1_out and the registered count.
// Interface: clk, rst_n (asynchronous, active low), s1_out, op_i.
// The counter follows the platform's operator table; restarting after M is
// this design's choice.
module sva_goto_rep #(
  parameter int unsigned N = 2,
  parameter int unsigned M = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic s1_out,
  output logic op_i
);
  localparam int unsigned CW = $clog2(M + 1);
  logic [CW-1:0] count_q, occ;

  assign occ  = s1_out ? count_q + 1'b1 : count_q;
  assign op_i = s1_out && (occ >= CW'(N)) && (occ <= CW'(M));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                       count_q <= '0;
    else if (s1_out && occ >= CW'(M)) count_q <= '0;
    else                              count_q <= occ;
endmodule
