// tb_sva_impl_overlap: random test of s1 |-> p1.
// Reference: in cycle t, op_i = !s1(t-1) || p1(t-1); 1 right after reset.
module tb_sva_impl_overlap;
  logic clk = 0, rst_n = 0, s1_out = 0, p1_out = 0, op_i;
  logic exp_op = 1'b1;
  int checks = 0, failures = 0, fails_seen = 0;

  sva_impl_overlap dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      s1_out = $urandom_range(0, 1);
      p1_out = $urandom_range(0, 1);
      #1;
      checks++;
      if (op_i !== exp_op) begin failures++; $display("t=%0d op_i=%0d exp=%0d", t, op_i, exp_op); end
      if (!op_i) fails_seen++;
      exp_op = !s1_out || p1_out;
    end
    checks++;
    if (fails_seen == 0) begin failures++; $display("no failure seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
