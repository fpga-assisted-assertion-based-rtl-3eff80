// sync_fifo: design under verification of the FIFO case studies, a
// single-clock FIFO of DEPTH words of WIDTH bits (16 x 8 by default).
// Circular buffer with read and write pointers and a fill counter. A write
// when full and a read when empty are ignored; simultaneous read and write
// are allowed. dout is registered: it shows the popped word from the clock
// edge of the read on.
// Interface: clk, rst_n (asynchronous, active low, empties the FIFO), wr_en,
// din[WIDTH], rd_en, dout[WIDTH], full, empty, count[$clog2(DEPTH)+1].
// Size follows the case study; everything else is this design's choice.
module sync_fifo #(
  parameter int unsigned DEPTH = abv_pkg::FIFO_DEPTH,
  parameter int unsigned WIDTH = abv_pkg::FIFO_WIDTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             full,
  output logic             empty,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      dout   <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) begin
        rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
        dout   <= mem[rd_ptr];
      end
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
endmodule
