// sticky_sync: carries assertion failure bits from the clock domain of a
// DUV into the collection module's clock domain without losing short
// failures.
// In the source domain each bit is made sticky: once a failure is seen it
// stays set until the source domain is reset (the collection module stores
// each assertion only once, so nothing is lost by holding it). The sticky
// bits then pass a two-flop synchronizer clocked by dst_clk. Because every
// bit only ever rises, bits that rise together may arrive one destination
// cycle apart, which the collection module tolerates.
// Interface: src_clk, src_rst_n, fail[W] (source domain); dst_clk,
// dst_rst_n, req[W] (destination domain). Timing: a failure reaches req
// two to three dst_clk edges after the src_clk edge that registered it.
// The sticky-plus-synchronizer crossing is this design's choice.
module sticky_sync #(
  parameter int unsigned W = 10
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic [W-1:0] fail,
  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic [W-1:0] req
);
  logic [W-1:0] sticky, meta;

  always_ff @(posedge src_clk or negedge src_rst_n)
    if (!src_rst_n) sticky <= '0;
    else            sticky <= sticky | fail;

  always_ff @(posedge dst_clk or negedge dst_rst_n)
    if (!dst_rst_n) begin
      meta <= '0;
      req  <= '0;
    end else begin
      meta <= sticky;
      req  <= meta;
    end
endmodule
