// updown_counter_platform: the verifiable hardware of the up-down counter
// case study as the platform builds it: the counter (DUV), its assertion
// module ASR_1..ASR_4, and a 4-input collection module (N = 4, M = 2).
// The DUV's signals the assertions need are brought out of the DUV and fed
// to the assertion module; the four failure bits are the collection
// module's request lines (ASR_k on request[k-1], so ASR_4 has priority).
// Interface: clk, rst_n, the counter inputs (en_load, en_ud, up, load) and
// its count, the failure bits asr, and the collection module's board I/O:
// rst_clk, din_user in; data_out, addr_mem, valid, we, full, stored out.
// Timing: a failure is stored at the clock edge ending the cycle it is
// granted in.
module updown_counter_platform #(
  parameter int unsigned WIDTH = abv_pkg::UD_WIDTH,
  parameter int unsigned N     = abv_pkg::UD_ASSERTIONS,
  localparam int unsigned M    = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en_load,
  input  logic             en_ud,
  input  logic             up,
  input  logic [WIDTH-1:0] load,
  output logic [WIDTH-1:0] cnt,
  output logic [N-1:0]     asr,
  input  logic             rst_clk,
  input  logic             din_user,
  output logic [M-1:0]     data_out,
  output logic [M-1:0]     addr_mem,
  output logic             valid,
  output logic             we,
  output logic             full,
  output logic [M:0]       stored
);
  updown_counter #(.WIDTH(WIDTH)) u_duv (
    .clk, .rst_n, .en_load, .en_ud, .up, .load, .cnt
  );

  updown_counter_assertions #(.WIDTH(WIDTH)) u_asr (
    .clk, .rst_n, .en_load, .en_ud, .load, .cnt, .asr
  );

  collection_module #(.N(N), .M(M)) u_collect (
    .clk, .rst_n, .rst_clk, .din_user, .request(asr),
    .data_out, .addr_mem, .valid, .we, .full, .stored
  );
endmodule
