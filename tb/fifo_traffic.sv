// fifo_traffic: drives one FIFO of the multiple-FIFO platform on that
// FIFO's own clock and checks the data it returns.
// After go_fill it writes 22 random words on consecutive cycles (16 fill
// the FIFO, the rest are overflow attempts) and raises filled. After
// go_drain it pops 16 words, comparing each with a queue model one clock
// after the pop (dout is registered), then reads the empty FIFO on
// UNDERFLOW_READS consecutive cycles and raises drained.
module fifo_traffic #(
  parameter int unsigned UNDERFLOW_READS = 4
) (
  input  logic       fclk,
  input  logic       go_fill,
  input  logic       go_drain,
  output logic       wr_en,
  output logic       rd_en,
  output logic [7:0] din,
  input  logic [7:0] dout,
  output bit         filled,
  output bit         drained,
  output int         checks,
  output int         failures
);
  logic [7:0] q [$];

  initial begin
    logic [7:0] e;
    wr_en = 0; rd_en = 0; din = '0; filled = 0; drained = 0; checks = 0; failures = 0;
    wait (go_fill);
    for (int i = 0; i < 22; i++) begin
      @(negedge fclk);
      wr_en = 1; din = 8'($urandom);
      if (q.size() < 16) q.push_back(din);
    end
    @(negedge fclk) wr_en = 0;
    filled = 1;
    wait (go_drain);
    for (int i = 0; i < 16; i++) begin
      @(negedge fclk) rd_en = 1;
      e = q.pop_front();
      @(negedge fclk) rd_en = 0;
      checks++;
      if (dout !== e) begin failures++; $display("FIFO data %h, expected %h (t=%0t)", dout, e, $time); end
    end
    for (int i = 0; i < int'(UNDERFLOW_READS); i++) @(negedge fclk) rd_en = 1;
    @(negedge fclk) rd_en = 0;
    drained = 1;
  end
endmodule
