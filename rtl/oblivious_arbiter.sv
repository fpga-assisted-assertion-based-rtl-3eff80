// oblivious_arbiter: fixed-priority ripple arbiter with blocking logic, the
// arbiter of the collection module.
// Each slice i has a request, a carry-in (may I grant?) and produces a grant
// and a carry-out (tmpcout) to the next lower slice. The chain starts at
// slice N-1 with carry_in, so the highest index has the highest priority and
// at most one request is granted per cycle. block[i] is an active-low block
// flag: it starts at 1 after reset, and once request i has been granted it
// drops to 0, so the same assertion is never granted (stored) again until
// the next reset. A blocked request does not stop the chain, so a lower
// request can be served in the same cycle.
// Interface: clk, rst_n (asynchronous, active low), carry_in (grant enable),
// request[N], grant[N] (one-hot or zero), block[N].
// Timing: grant is combinational from request, block and carry_in; block is
// updated at the clock edge ending a grant cycle.
// Slice structure and blocking follow the platform; the priority direction
// (index N-1 first) follows its 4-bit example, where request[3] is served
// first.
module oblivious_arbiter #(
  parameter int unsigned N = 1000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         carry_in,
  input  logic [N-1:0] request,
  output logic [N-1:0] grant,
  output logic [N-1:0] block
);
  // Grant chain: c is the carry running from slice N-1 down to slice 0.
  always_comb begin
    logic c;
    c = carry_in;
    for (int i = int'(N) - 1; i >= 0; i--) begin
      grant[i] = c && request[i] && block[i];
      c        = c && !(request[i] && block[i]);   // tmpcout of slice i
    end
  end

  // Blocking logic: served requests are masked from now on.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) block <= '1;
    else        block <= block & ~grant;

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant))
    else $error("oblivious_arbiter: more than one grant");
  a_no_regrant: assert property (@(posedge clk) disable iff (!rst_n) (grant & ~block) == '0)
    else $error("oblivious_arbiter: blocked request granted");
endmodule
