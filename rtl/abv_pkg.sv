// abv_pkg: constants shared by the assertion-based verification platform.
// The collection module stores the index of every assertion that fails; the
// case-study sizes below (assertion counts, FIFO geometry, counter width) are
// the ones the platform was evaluated with. The index layout of the
// multiple-FIFO platform (10 per FIFO, then the two all-full/all-empty checks)
// is this design's own choice.
package abv_pkg;
  // Up-down counter case study: 8-bit counter, four assertions ASR_1..ASR_4.
  localparam int unsigned UD_WIDTH      = 8;
  localparam int unsigned UD_ASSERTIONS = 4;
  localparam int unsigned UD_IDLE_REP   = 10;   // ASR_4: not idle[*10]

  // FIFO case studies: 16 words of 8 bits, ten assertions per FIFO.
  localparam int unsigned FIFO_DEPTH      = 16;
  localparam int unsigned FIFO_WIDTH      = 8;
  localparam int unsigned FIFO_ASSERTIONS = 10;
  localparam int unsigned NUM_FIFOS       = 3;
  // Multiple-FIFO platform: 3 x 10 + ERROR_FIFO_ALL_SHOULD_BE_FULL/EMPTY.
  localparam int unsigned MF_ASSERTIONS   = NUM_FIFOS * FIFO_ASSERTIONS + 2;
  localparam int unsigned MF_IDX_ALL_FULL  = NUM_FIFOS * FIFO_ASSERTIONS;
  localparam int unsigned MF_IDX_ALL_EMPTY = NUM_FIFOS * FIFO_ASSERTIONS + 1;

  // Collection module capacity of the main configuration.
  localparam int unsigned COLLECT_N = 1000;
endpackage
