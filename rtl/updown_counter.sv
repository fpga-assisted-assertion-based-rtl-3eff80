// updown_counter: design under verification of the first case study, a
// WIDTH-bit loadable up/down counter.
// en_load has priority and loads `load`; otherwise en_ud counts one step,
// up when `up` is 1 and down when it is 0, wrapping at both ends; with
// neither enable the count holds.
// Interface: clk, rst_n (asynchronous, active low, count resets to 0),
// en_load, en_ud, up, load[WIDTH], cnt[WIDTH]. Timing: cnt changes at the
// clock edge after the enables.
// The signal names cnt, en_load, en_ud and load and the 8-bit width come
// from the case study's assertions; the direction input `up` and the load
// priority are this design's choices.
module updown_counter #(
  parameter int unsigned WIDTH = abv_pkg::UD_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en_load,
  input  logic             en_ud,
  input  logic             up,
  input  logic [WIDTH-1:0] load,
  output logic [WIDTH-1:0] cnt
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       cnt <= '0;
    else if (en_load) cnt <= load;
    else if (en_ud)   cnt <= up ? cnt + 1'b1 : cnt - 1'b1;
endmodule
