// addr_counter: the collection module's address counter. It counts the
// results that have been written or read and its value is the memory
// address of the next access. It advances when en is high (the OR of "a
// grant was issued" and "the user reads"), wraps modulo 2**M, and clr clears
// it synchronously (the board's "reset clock" switch); rst_n clears it
// asynchronously.
// Interface: clk, rst_n, clr, en, addr[M]. Timing: addr changes at the edge
// after en.
module addr_counter #(
  parameter int unsigned M = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  output logic [M-1:0] addr
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   addr <= '0;
    else if (clr) addr <= '0;
    else if (en)  addr <= addr + 1'b1;
endmodule
