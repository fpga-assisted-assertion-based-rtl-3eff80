// tb_sync_fifo: random push/pop (including writes when full and reads when
// empty) against a queue model of a 16 x 8 FIFO.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [7:0] din = '0, dout;
  logic full, empty;
  logic [4:0] count;
  logic [7:0] q [$];
  logic [7:0] exp_dout = '0;
  int checks = 0, failures = 0, full_seen = 0, empty_rd = 0;

  sync_fifo #(.DEPTH(16), .WIDTH(8)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (count !== 5'(q.size()) || full !== (q.size() == 16) || empty !== (q.size() == 0) || dout !== exp_dout) begin
        failures++;
        $display("t=%0d count=%0d/%0d full=%0d empty=%0d dout=%h/%h", t, count, q.size(), full, empty, dout, exp_dout);
      end
      if (full) full_seen++;
      // alternate fill-biased and drain-biased phases
      wr_en = (t % 400 < 200) ? ($urandom_range(0, 9) < 7) : ($urandom_range(0, 9) < 3);
      rd_en = (t % 400 < 200) ? ($urandom_range(0, 9) < 3) : ($urandom_range(0, 9) < 7);
      din = 8'($urandom);
      if (rd_en && q.size() == 0) empty_rd++;
      begin
        bit do_wr, do_rd;
        do_wr = wr_en && q.size() < 16;
        do_rd = rd_en && q.size() > 0;
        if (do_rd) exp_dout = q.pop_front();
        if (do_wr) q.push_back(din);
      end
    end
    checks++;
    if (full_seen == 0 || empty_rd == 0) begin failures++; $display("coverage hole"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
