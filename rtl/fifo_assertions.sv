// fifo_assertions: synthesized assertion module of one FIFO, ten checkers
// built from the operator library. Each output bit is 1 while its assertion
// fails (never during reset). The case study verified its FIFO with ten
// assertions, one of them with a repetition count, but did not list them;
// the ten below are this design's choice of standard FIFO properties, picked
// so that every operator of the library is used once.
//   asr[0] full  |-> count == DEPTH                 (sva_impl_overlap)
//   asr[1] empty |-> count == 0                     (sva_impl_overlap)
//   asr[2] if (count == 0) empty else !empty        (sva_if, registered)
//   asr[3] push-only |=> count == $past(count) + 1  (nonoverlap, $past)
//   asr[4] pop-only  |=> count == $past(count) - 1  (nonoverlap, $past)
//   asr[5] idle |=> $stable(count)                  (nonoverlap, $stable)
//   asr[6] not (wr_en && full)[*4]     four overflow attempts in a row
//   asr[7] not ((push-only && empty) ##1 empty)     (sva_delay)
//   asr[8] not (full and empty)                     (sva_and)
//   asr[9] not (rd_en && empty)[->4]   fourth underflow attempt (sva_goto_rep)
// Timing: asr[0..5] report one clock after the checked cycle, asr[8] one
// clock after both flags were seen, asr[6,7,9] in the cycle of the match.
// Interface: clk, rst_n, wr_en, rd_en, full, empty, count, asr[10].
module fifo_assertions #(
  parameter int unsigned DEPTH = abv_pkg::FIFO_DEPTH,
  localparam int unsigned CW   = $clog2(DEPTH) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic          rd_en,
  input  logic          full,
  input  logic          empty,
  input  logic [CW-1:0] count,
  output logic [9:0]    asr
);
  logic [9:0]    cov;
  logic [CW-1:0] past_count;
  logic          push_only, pop_only, idle, cnt_stable, if_cov;

  assign push_only = wr_en && !rd_en && !full;
  assign pop_only  = rd_en && !wr_en && !empty;
  assign idle      = !wr_en && !rd_en;

  sva_impl_overlap u_a0 (.clk, .rst_n, .s1_out(full),  .p1_out(count == CW'(DEPTH)), .op_i(cov[0]));
  sva_impl_overlap u_a1 (.clk, .rst_n, .s1_out(empty), .p1_out(count == '0),         .op_i(cov[1]));

  sva_if #(.HAS_ELSE(1'b1)) u_a2 (.expr(count == '0), .p1_out(empty), .p2_out(!empty), .op_i(if_cov));
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cov[2] <= 1'b1;
    else        cov[2] <= if_cov;

  sva_past #(.W(CW)) u_past (.clk, .rst_n, .a(count), .op_i(past_count));
  sva_impl_nonoverlap u_a3 (.clk, .rst_n, .s1_out(push_only), .p1_out(count == past_count + 1'b1), .op_i(cov[3]));
  sva_impl_nonoverlap u_a4 (.clk, .rst_n, .s1_out(pop_only),  .p1_out(count == past_count - 1'b1), .op_i(cov[4]));

  sva_stable #(.W(CW)) u_stable (.clk, .rst_n, .a(count), .op_i(cnt_stable));
  sva_impl_nonoverlap u_a5 (.clk, .rst_n, .s1_out(idle), .p1_out(cnt_stable), .op_i(cov[5]));

  // Sequence matches below are the failures themselves ("not" properties).
  sva_consec_rep #(.N(4), .M(4)) u_a6 (.clk, .rst_n, .s1_out(wr_en && full), .op_i(cov[6]));
  sva_delay #(.N(1), .M(1)) u_a7 (.clk, .rst_n, .s1_out(push_only && empty), .s2_out(empty), .op_i(cov[7]));
  sva_and u_a8 (.clk, .rst_n,
                .s1_on(full),  .s1_out(full),  .s1_off(!full),
                .s2_on(empty), .s2_out(empty), .s2_off(!empty), .op_i(cov[8]));
  sva_goto_rep #(.N(4), .M(4)) u_a9 (.clk, .rst_n, .s1_out(rd_en && empty), .op_i(cov[9]));

  assign asr[5:0] = rst_n ? ~cov[5:0] : '0;
  assign asr[9:6] = rst_n ?  cov[9:6] : '0;
endmodule
