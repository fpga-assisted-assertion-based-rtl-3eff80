// sva_and: synthesized checker for the sequence operator s1 and s2.
// Both sequences start together and may end at different times; the
// combination matches once the later of the two has matched. Each sequence
// is described by three signals: *_on (an attempt starts this cycle), *_out
// (the sequence matches this cycle) and *_off (level: no attempt of it is in
// progress). temp_s1/temp_s2 remember that each sequence has matched,
// comb_out that both started together; all three clear when both sequences
// are off.
// Timing: op_i = temp_s1 & temp_s2 & comb_out is registered state, so it
// rises the cycle after the later sequence matched.
// Interface: clk, rst_n (asynchronous, active low), s1_on/out/off,
// s2_on/out/off, op_i. Structure follows the platform's operator table; the
// level meaning of *_off is this design's reading.
module sva_and (
  input  logic clk,
  input  logic rst_n,
  input  logic s1_on,
  input  logic s1_out,
  input  logic s1_off,
  input  logic s2_on,
  input  logic s2_out,
  input  logic s2_off,
  output logic op_i
);
  logic temp_s1, temp_s2, comb_out;
  logic both_off;
  assign both_off = s1_off && s2_off;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      temp_s1  <= 1'b0;
      temp_s2  <= 1'b0;
      comb_out <= 1'b0;
    end else if (both_off) begin
      temp_s1  <= 1'b0;
      temp_s2  <= 1'b0;
      comb_out <= 1'b0;
    end else begin
      if (s1_out)          temp_s1  <= 1'b1;
      if (s2_out)          temp_s2  <= 1'b1;
      if (s1_on && s2_on)  comb_out <= 1'b1;
    end

  assign op_i = temp_s1 && temp_s2 && comb_out;
endmodule
