// result_memory: the collection module's storage, 2**M words of W bits,
// each word the index of one failed assertion. One port: a write stores din
// at addr at the clock edge; a read registers mem[addr] into dout at the
// clock edge, so dout shows the word of the address of the previous cycle.
// dout holds its value when not reading. Contents are not reset.
// Interface: clk, we, re, addr[M], din[W], dout[W]. Timing: write and read
// both take effect at the clock edge; read latency one clock.
module result_memory #(
  parameter int unsigned M = 10,
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         we,
  input  logic         re,
  input  logic [M-1:0] addr,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [W-1:0] mem [2**M];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    if (re) dout <= mem[addr];
  end
endmodule
