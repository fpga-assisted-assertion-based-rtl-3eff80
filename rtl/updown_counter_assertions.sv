// updown_counter_assertions: the synthesized assertion module of the
// up-down counter, four checkers built from the operator library. Each
// output bit is 1 while its assertion fails (and never during reset).
//   asr[0] ASR_1: (!en_ud && !en_load) |=> $stable(cnt)
//   asr[1] ASR_2: en_load |=> (cnt == $past(load))
//   asr[2] ASR_3: !en_load |=> !(cnt == ~$past(cnt) && cnt[MSB] == cnt[0])
//                 (fires when the count jumps to its own complement with
//                 equal end bits, e.g. the underflow 0 -> all ones)
//   asr[3] ASR_4: not (!en_load && !en_ud)[*IDLE_REP]  (counter idle for
//                 IDLE_REP cycles in a row, a 4-bit counter for 10)
// Implications use sva_impl_nonoverlap, whose coverage is inverted into
// the failure bit; ASR_4 uses sva_consec_rep, whose match is the failure.
// Timing: ASR_1..3 report one clock after the consequent cycle (two after
// the antecedent); ASR_4 reports in the IDLE_REP-th idle cycle and stays
// high while the counter remains idle.
// Interface: clk, rst_n, en_load, en_ud, load[WIDTH], cnt[WIDTH], asr[4].
// The four properties and their operator mapping follow the case study;
// clearing the ASR_4 counter when the counter leaves idle is this design's
// reading of a consecutive repetition.
module updown_counter_assertions #(
  parameter int unsigned WIDTH    = abv_pkg::UD_WIDTH,
  parameter int unsigned IDLE_REP = abv_pkg::UD_IDLE_REP
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en_load,
  input  logic             en_ud,
  input  logic [WIDTH-1:0] load,
  input  logic [WIDTH-1:0] cnt,
  output logic [3:0]       asr
);
  logic             idle;
  logic             cnt_stable, cov1, cov2, cov3, rep4;
  logic [WIDTH-1:0] past_load, past_cnt;
  logic             eq_load, compl_hit;

  assign idle = !en_ud && !en_load;

  // ASR_1
  sva_stable #(.W(WIDTH)) u_stable1 (.clk, .rst_n, .a(cnt), .op_i(cnt_stable));
  sva_impl_nonoverlap u_impl1 (.clk, .rst_n, .s1_out(idle), .p1_out(cnt_stable), .op_i(cov1));

  // ASR_2
  sva_past #(.W(WIDTH)) u_past2 (.clk, .rst_n, .a(load), .op_i(past_load));
  assign eq_load = (cnt == past_load);
  sva_impl_nonoverlap u_impl2 (.clk, .rst_n, .s1_out(en_load), .p1_out(eq_load), .op_i(cov2));

  // ASR_3
  sva_past #(.W(WIDTH)) u_past3 (.clk, .rst_n, .a(cnt), .op_i(past_cnt));
  assign compl_hit = (cnt == ~past_cnt) && (cnt[WIDTH-1] == cnt[0]);
  sva_impl_nonoverlap u_impl3 (.clk, .rst_n, .s1_out(!en_load), .p1_out(!compl_hit), .op_i(cov3));

  // ASR_4
  sva_consec_rep #(.N(IDLE_REP), .M(IDLE_REP)) u_rep4 (.clk, .rst_n, .s1_out(idle), .op_i(rep4));

  assign asr[0] = rst_n && !cov1;
  assign asr[1] = rst_n && !cov2;
  assign asr[2] = rst_n && !cov3;
  assign asr[3] = rst_n && rep4;
endmodule
