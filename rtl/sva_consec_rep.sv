// sva_consec_rep: synthesized checker for the consecutive repetition s1[*N:M].
// Instead of one flip-flop per repetition (an automaton), a saturating counter
// of $clog2(M+1) bits counts how many cycles in a row s1 has occurred. The
// count is cleared in any cycle without s1 and stops at M. op_i (coverage) is
// high in every cycle where s1 occurs and the run ending in this cycle is at
// least N long, i.e. s1 has matched N..M times back to back.
// Timing: op_i is combinational from s1_out and the registered count, so the
// N-th consecutive occurrence is flagged in the cycle it happens.
// Interface: clk, rst_n (asynchronous, active low), s1_out, op_i.
// Counter-based translation follows the platform's operator table; holding
// op_i high once the run exceeds M (saturation) is this design's choice.
module sva_consec_rep #(
  parameter int unsigned N = 2,
  parameter int unsigned M = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic s1_out,
  output logic op_i
);
  localparam int unsigned CW = $clog2(M + 1);
  logic [CW-1:0] count_q, run;

  always_comb begin
    if (!s1_out)                run = '0;
    else if (count_q < CW'(M))  run = count_q + 1'b1;
    else                        run = count_q;
  end

  assign op_i = s1_out && (run >= CW'(N)) && (run <= CW'(M));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) count_q <= '0;
    else        count_q <= run;
endmodule
