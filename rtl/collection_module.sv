// collection_module: stores, in hardware, which assertions have failed, so
// results need not be streamed to a host while the design runs.
// Every bit of request is the result of one assertion checker (1 = failed).
// The oblivious arbiter with blocking logic grants one request per cycle,
// highest index first, and serves each assertion only once. The one-hot
// grant is encoded to the M-bit assertion index and written to the result
// memory at the address held by the address counter; the counter advances
// through an OR of "grant issued" and din_user.
// Write mode (din_user = 0): one index stored per cycle, we = 1 in cycles
// that store. Collection ends when N results are stored (full).
// Read mode (din_user = 1): collection is suspended (no grant, so nothing is
// lost to blocking), and each cycle the word at addr is read to data_out
// while the counter moves on; data_out lags addr by one cycle. rst_clk
// clears the counter, so a read-out usually starts with a rst_clk pulse.
// valid is high while data_out holds a word that was written (address below
// the number of stored results). In write mode data_out is 0.
// Interface: clk, rst_n, rst_clk, din_user, request[N]; data_out[M],
// addr_mem[M], valid, we, full, stored[M+1].
// The arbiter/encoder/counter/memory/OR structure follows the platform; the
// suspension of grants in read mode, the stored-count register behind full
// and valid, and the meaning of valid are this design's choices.
module collection_module #(
  parameter int unsigned N = abv_pkg::COLLECT_N,
  parameter int unsigned M = $clog2(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rst_clk,
  input  logic         din_user,
  input  logic [N-1:0] request,
  output logic [M-1:0] data_out,
  output logic [M-1:0] addr_mem,
  output logic         valid,
  output logic         we,
  output logic         full,
  output logic [M:0]   stored
);
  logic [N-1:0] grant, block;
  logic [M-1:0] data_in;
  logic         write_ok;

  assign write_ok = !din_user && !full;

  oblivious_arbiter #(.N(N)) u_arbiter (
    .clk, .rst_n, .carry_in(write_ok), .request, .grant, .block
  );

  onehot_encoder #(.N(N), .M(M)) u_encoder (.onehot(grant), .index(data_in));

  assign we = |grant;

  addr_counter #(.M(M)) u_counter (
    .clk, .rst_n, .clr(rst_clk), .en(we || din_user), .addr(addr_mem)
  );

  logic [M-1:0] mem_dout;
  logic         read_q;

  result_memory #(.M(M), .W(M)) u_memory (
    .clk, .we, .re(din_user), .addr(addr_mem), .din(data_in), .dout(mem_dout)
  );

  // data_out shows the word read in the previous cycle, and 0 in write mode.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) read_q <= 1'b0;
    else        read_q <= din_user;

  assign data_out = read_q ? mem_dout : '0;

  // Number of results stored since reset; collection terminates at N.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  stored <= '0;
    else if (we) stored <= stored + 1'b1;

  assign full = (stored >= (M+1)'(N));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) valid <= 1'b0;
    else        valid <= din_user && ((M+1)'(addr_mem) < stored);

  a_no_write_in_read: assert property (@(posedge clk) disable iff (!rst_n) din_user |-> !we)
    else $error("collection_module: write during read mode");
endmodule
