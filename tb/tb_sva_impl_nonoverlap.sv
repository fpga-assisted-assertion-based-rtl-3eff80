// tb_sva_impl_nonoverlap: random test of s1 |=> p1.
// Reference: in cycle t, op_i = !s1(t-2) || p1(t-1); history starts at 0
// after reset, so op_i is 1 in the first cycles.
module tb_sva_impl_nonoverlap;
  logic clk = 0, rst_n = 0, s1_out = 0, p1_out = 0, op_i;
  logic s1_d1 = 0, s1_d2 = 0, p1_d1 = 1;
  int checks = 0, failures = 0, fails_seen = 0;

  sva_impl_nonoverlap dut (.*);

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
      if (op_i !== (!s1_d2 || p1_d1)) begin
        failures++; $display("t=%0d op_i=%0d s1(t-2)=%0d p1(t-1)=%0d", t, op_i, s1_d2, p1_d1);
      end
      if (!op_i) fails_seen++;
      s1_d2 = s1_d1; s1_d1 = s1_out; p1_d1 = p1_out;
    end
    checks++;
    if (fails_seen == 0) begin failures++; $display("no failure seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
