// abv_platform_top: the two case-study platforms side by side, each a
// design under verification wired to its synthesized assertion module and
// to a collection module that records, in on-chip memory, the index of
// every assertion that fails, once per assertion.
//   ud_*  up-down counter platform: 8-bit counter, ASR_1..ASR_4, 4-entry
//         collection module (2-bit indices).
//   mf_*  multiple-FIFO platform: three 16 x 8 FIFOs with ten checkers each
//         plus the all-full/all-empty checkers, 32-entry collection module
//         (5-bit indices).
// Each platform has its own board-style I/O: din_user (read mode), rst_clk
// (clear the address counter), data_out (stored index read back),
// addr_mem, valid, we, full and stored. Both collection modules run on clk
// and are reset by rst_n; the three FIFOs run on their own clocks
// mf_fifo_clk[k] and have their own resets mf_fifo_rst_n[k]. mf_asr are
// the raw checker outputs, mf_request the same failures in the clk domain.
// Timing: a failing assertion is stored at the earliest at the clock edge
// ending the cycle it is reported in; read data appears one clock after its
// address.
module abv_platform_top
  import abv_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // up-down counter platform
  input  logic                          ud_en_load,
  input  logic                          ud_en_ud,
  input  logic                          ud_up,
  input  logic [UD_WIDTH-1:0]           ud_load,
  output logic [UD_WIDTH-1:0]           ud_cnt,
  output logic [UD_ASSERTIONS-1:0]      ud_asr,
  input  logic                          ud_rst_clk,
  input  logic                          ud_din_user,
  output logic [$clog2(UD_ASSERTIONS)-1:0] ud_data_out,
  output logic [$clog2(UD_ASSERTIONS)-1:0] ud_addr_mem,
  output logic                          ud_valid,
  output logic                          ud_we,
  output logic                          ud_full,
  output logic [$clog2(UD_ASSERTIONS):0] ud_stored,
  // multiple-FIFO platform
  input  logic [NUM_FIFOS-1:0]          mf_fifo_clk,
  input  logic [NUM_FIFOS-1:0]          mf_fifo_rst_n,
  input  logic [NUM_FIFOS-1:0]          mf_wr_en,
  input  logic [NUM_FIFOS-1:0][FIFO_WIDTH-1:0] mf_din,
  input  logic [NUM_FIFOS-1:0]          mf_rd_en,
  output logic [NUM_FIFOS-1:0][FIFO_WIDTH-1:0] mf_dout,
  output logic [NUM_FIFOS-1:0]          mf_fifo_full,
  output logic [NUM_FIFOS-1:0]          mf_fifo_empty,
  output logic [MF_ASSERTIONS-1:0]      mf_asr,
  output logic [MF_ASSERTIONS-1:0]      mf_request,
  input  logic                          mf_rst_clk,
  input  logic                          mf_din_user,
  output logic [$clog2(MF_ASSERTIONS)-1:0] mf_data_out,
  output logic [$clog2(MF_ASSERTIONS)-1:0] mf_addr_mem,
  output logic                          mf_valid,
  output logic                          mf_we,
  output logic                          mf_full,
  output logic [$clog2(MF_ASSERTIONS):0] mf_stored
);
  updown_counter_platform #(.WIDTH(UD_WIDTH), .N(UD_ASSERTIONS)) u_ud (
    .clk, .rst_n,
    .en_load(ud_en_load), .en_ud(ud_en_ud), .up(ud_up), .load(ud_load), .cnt(ud_cnt),
    .asr(ud_asr), .rst_clk(ud_rst_clk), .din_user(ud_din_user),
    .data_out(ud_data_out), .addr_mem(ud_addr_mem), .valid(ud_valid), .we(ud_we),
    .full(ud_full), .stored(ud_stored)
  );

  multi_fifo_platform #(.N(MF_ASSERTIONS)) u_mf (
    .clk, .rst_n, .fifo_clk(mf_fifo_clk), .fifo_rst_n(mf_fifo_rst_n),
    .wr_en(mf_wr_en), .din(mf_din), .rd_en(mf_rd_en), .dout(mf_dout),
    .fifo_full(mf_fifo_full), .fifo_empty(mf_fifo_empty), .asr(mf_asr), .request(mf_request),
    .rst_clk(mf_rst_clk), .din_user(mf_din_user),
    .data_out(mf_data_out), .addr_mem(mf_addr_mem), .valid(mf_valid), .we(mf_we),
    .full(mf_full), .stored(mf_stored)
  );
endmodule
