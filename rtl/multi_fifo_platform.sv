// multi_fifo_platform: the verifiable hardware of the multiple-FIFO case
// study: three 16 x 8 FIFOs, each in its own clock and reset domain with its
// own ten-checker assertion module, two top-level checkers, and a 32-input
// collection module (M = 5) in the domain of clk.
//   ERROR_FIFO_ALL_SHOULD_BE_FULL  (request 30): all three FIFOs full,
//     built as (full0 && full1) intersect full2 on the synchronized flags;
//     reported one clock after the second consecutive all-full cycle.
//   ERROR_FIFO_ALL_SHOULD_BE_EMPTY (request 31): all three FIFOs empty,
//     built as (empty0 && empty1) and empty2 on the synchronized flags;
//     reported one clock after the first all-empty cycle.
// FIFO k's checkers run on fifo_clk[k] and drive asr[10k +: 10]. Their
// failures cross into clk through sticky_sync (held until FIFO k is reset,
// then two-flop synchronized), so even a one-cycle failure in a fast
// domain reaches the collection module; request[10k +: 10] is the crossed
// vector. The full/empty flags cross through sync_2ff for the two
// top-level checkers. Each FIFO's reset is fifo_rst_n[k] ANDed with rst_n.
// The domain structure follows the case study; the crossing circuits are
// this design's choice, as is keeping a failure pending until its FIFO is
// reset (the collection module stores each index once in any case).
// Interface: clk, rst_n, fifo_clk[3], fifo_rst_n[3], per-FIFO wr_en, din,
// rd_en, dout, fifo_full, fifo_empty (fifo_clk[k] domain), the raw
// checker outputs asr[32], the collection inputs request[32] (clk domain),
// and the collection module's board I/O (rst_clk, din_user, data_out,
// addr_mem, valid, we, full, stored).
module multi_fifo_platform
  import abv_pkg::*;
#(
  parameter int unsigned N  = MF_ASSERTIONS,
  localparam int unsigned M = $clog2(N)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [NUM_FIFOS-1:0]            fifo_clk,
  input  logic [NUM_FIFOS-1:0]            fifo_rst_n,
  input  logic [NUM_FIFOS-1:0]            wr_en,
  input  logic [NUM_FIFOS-1:0][FIFO_WIDTH-1:0] din,
  input  logic [NUM_FIFOS-1:0]            rd_en,
  output logic [NUM_FIFOS-1:0][FIFO_WIDTH-1:0] dout,
  output logic [NUM_FIFOS-1:0]            fifo_full,
  output logic [NUM_FIFOS-1:0]            fifo_empty,
  output logic [N-1:0]                    asr,
  output logic [N-1:0]                    request,
  input  logic                            rst_clk,
  input  logic                            din_user,
  output logic [M-1:0]                    data_out,
  output logic [M-1:0]                    addr_mem,
  output logic                            valid,
  output logic                            we,
  output logic                            full,
  output logic [M:0]                      stored
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;
  logic [NUM_FIFOS-1:0][CW-1:0] count;
  logic [NUM_FIFOS-1:0]         f_rst_n;

  for (genvar k = 0; k < NUM_FIFOS; k++) begin : g_fifo
    assign f_rst_n[k] = rst_n && fifo_rst_n[k];

    sync_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(FIFO_WIDTH)) u_fifo (
      .clk(fifo_clk[k]), .rst_n(f_rst_n[k]), .wr_en(wr_en[k]), .din(din[k]), .rd_en(rd_en[k]),
      .dout(dout[k]), .full(fifo_full[k]), .empty(fifo_empty[k]), .count(count[k])
    );

    fifo_assertions #(.DEPTH(FIFO_DEPTH)) u_asr (
      .clk(fifo_clk[k]), .rst_n(f_rst_n[k]), .wr_en(wr_en[k]), .rd_en(rd_en[k]),
      .full(fifo_full[k]), .empty(fifo_empty[k]), .count(count[k]),
      .asr(asr[k*FIFO_ASSERTIONS +: FIFO_ASSERTIONS])
    );

    sticky_sync #(.W(FIFO_ASSERTIONS)) u_cross (
      .src_clk(fifo_clk[k]), .src_rst_n(f_rst_n[k]),
      .fail(asr[k*FIFO_ASSERTIONS +: FIFO_ASSERTIONS]),
      .dst_clk(clk), .dst_rst_n(rst_n),
      .req(request[k*FIFO_ASSERTIONS +: FIFO_ASSERTIONS])
    );
  end

  // FIFO flags in the collection clock domain
  logic [NUM_FIFOS-1:0] full_s, empty_s;
  sync_2ff #(.W(NUM_FIFOS), .RESET_VAL('0)) u_sync_full  (.clk, .rst_n, .d(fifo_full),  .q(full_s));
  sync_2ff #(.W(NUM_FIFOS), .RESET_VAL('1)) u_sync_empty (.clk, .rst_n, .d(fifo_empty), .q(empty_s));

  logic f01, e01, all_full_op, all_empty_op;
  assign f01 = full_s[0]  && full_s[1];
  assign e01 = empty_s[0] && empty_s[1];

  sva_intersect u_all_full (.clk, .rst_n,
    .s1_on(f01), .s1_out(f01), .s1_off(!f01),
    .s2_on(full_s[2]), .s2_out(full_s[2]), .s2_off(!full_s[2]),
    .op_i(all_full_op));

  sva_and u_all_empty (.clk, .rst_n,
    .s1_on(e01), .s1_out(e01), .s1_off(!e01),
    .s2_on(empty_s[2]), .s2_out(empty_s[2]), .s2_off(!empty_s[2]),
    .op_i(all_empty_op));

  assign asr[MF_IDX_ALL_FULL]  = rst_n && all_full_op;
  assign asr[MF_IDX_ALL_EMPTY] = rst_n && all_empty_op;
  assign request[MF_IDX_ALL_FULL]  = asr[MF_IDX_ALL_FULL];
  assign request[MF_IDX_ALL_EMPTY] = asr[MF_IDX_ALL_EMPTY];

  collection_module #(.N(N), .M(M)) u_collect (
    .clk, .rst_n, .rst_clk, .din_user, .request,
    .data_out, .addr_mem, .valid, .we, .full, .stored
  );

  initial begin
    assert (N == MF_ASSERTIONS) else $error("multi_fifo_platform: N must be %0d", MF_ASSERTIONS);
  end
endmodule
