// onehot_encoder: turns the one-hot grant of the arbiter into the binary
// index of the granted assertion, the data word stored by the collection
// module (N = 1000 lines to M = 10 bits in the main configuration).
// The index is the OR of the indices of all set lines, which is exact for a
// one-hot input; an all-zero input gives 0.
// Interface: onehot[N] in, index[M] out. Timing: combinational.
module onehot_encoder #(
  parameter int unsigned N = 1000,
  parameter int unsigned M = $clog2(N)
) (
  input  logic [N-1:0] onehot,
  output logic [M-1:0] index
);
  always_comb begin
    index = '0;
    for (int i = 0; i < int'(N); i++)
      if (onehot[i]) index |= M'(i);
  end
endmodule
