// tb_sticky_sync: self-checking test of the failure-bit clock crossing.
// The source clock (period 4) is faster than and unrelated to the
// destination clock (period 14). Random one-cycle failure pulses are
// applied in the source domain; a model ORs every pulse seen. The test
// checks that no bit reaches req prev_seen it was seen, that a bit is not yet
// on req one destination edge after its pulse, that every seen bit is on
// req three destination edges later, that bits stay set, and that a
// source reset clears them within three destination edges. It prints TB_RESULT and has a watchdog.
module tb_sticky_sync;
  localparam int unsigned W = 10;

  logic src_clk = 1'b0, dst_clk = 1'b0;
  logic src_rst_n = 1'b0, dst_rst_n = 1'b0;
  logic [W-1:0] fail = '0, req, seen = '0;
  logic settling = 1'b0;
  time  t_set, t_dst = 0;  // source edge that set the pulse, last destination edge  // source reset still crossing to req
  int checks = 0, failures = 0;

  always #2 src_clk = ~src_clk;
  always #7 dst_clk = ~dst_clk;

  sticky_sync #(.W(W)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: req=%b seen=%b at %0t", what, req, seen, $time);
    end
  endtask

  // req may only hold bits that were pulsed since the last source reset.
  always @(negedge dst_clk)
    if (src_rst_n && dst_rst_n && !settling) check((req & ~seen) == '0, "req holds an unseen bit");

  always @(posedge dst_clk) t_dst = $time;

  task automatic pulse(input logic [W-1:0] bits);
    @(negedge src_clk) fail = bits;
    @(posedge src_clk) t_set = $time;
    @(negedge src_clk) fail = '0;
    seen |= bits;
  endtask

  initial begin
    repeat (3) @(negedge dst_clk);
    src_rst_n = 1'b1;
    dst_rst_n = 1'b1;
    repeat (3) @(negedge dst_clk);
    check(req == '0, "req clear after reset");
    for (int round = 0; round < 20; round++) begin
      logic [W-1:0] prev_seen, bits;
      logic quiet;
      prev_seen = seen;
      bits   = W'(1) << ($urandom % W);
      pulse(bits);
      // skipped when a destination edge already fell after the setting edge
      quiet = t_dst < t_set;
      @(posedge dst_clk) #1;
      if ((bits & ~prev_seen) != '0 && quiet)
        check((req & bits & ~prev_seen) == '0, "new bit on req after one edge");
      repeat (2) @(posedge dst_clk);
      #1 check(req == seen, "seen bits on req after three edges");
      // several pulses in quick succession, some in consecutive cycles
      repeat ($urandom % 4) pulse(W'($urandom));
      repeat (3) @(posedge dst_clk);
      #1 check(req == seen, "burst fully on req");
      if (round % 7 == 6) begin
        @(negedge src_clk) src_rst_n = 1'b0;
        seen = '0;
        settling = 1'b1;
        #3 src_rst_n = 1'b1;
        repeat (3) @(posedge dst_clk);
        #1 check(req == '0, "source reset clears req");
        settling = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge dst_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
