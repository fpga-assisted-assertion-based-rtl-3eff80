// sync_2ff: two-flop synchronizer for W independent level signals (here
// the full and empty flags of FIFOs in other clock domains), so that logic
// in the destination domain can combine them. Each bit is synchronized on
// its own; bits may arrive one cycle apart.
// Interface: clk, rst_n (asynchronous, active low, output resets to
// RESET_VAL), d[W], q[W]. Timing: two clock edges of latency.
module sync_2ff #(
  parameter int unsigned W = 1,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
endmodule
