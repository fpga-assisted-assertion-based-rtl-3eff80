// tb_sva_delay: random test of s1 ##[N:M] s2 with N=2, M=3 and of the
// plain s1 ##1 s2 (default parameters).
// Reference: op_i = s2 now and s1 occurred 2 or 3 cycles ago (resp. 1
// cycle ago), from a stimulus history kept here.
module tb_sva_delay;
  logic clk = 0, rst_n = 0, s1_out = 0, s2_out = 0, op_a, op_b;
  logic [7:0] h = '0;   // h[k] = s1 k cycles ago (h[0] unused)
  int checks = 0, failures = 0, hits = 0;

  sva_delay #(.N(2), .M(3)) dut_a (.clk, .rst_n, .s1_out, .s2_out, .op_i(op_a));
  sva_delay                 dut_b (.clk, .rst_n, .s1_out, .s2_out, .op_i(op_b));

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      s1_out = ($urandom_range(0, 99) < 25);
      s2_out = ($urandom_range(0, 99) < 50);
      #1;
      checks += 2;
      if (op_a !== (s2_out && (h[2] || h[3]))) begin
        failures++; $display("t=%0d ##[2:3] op=%0d h=%b", t, op_a, h);
      end
      if (op_b !== (s2_out && h[1])) begin
        failures++; $display("t=%0d ##1 op=%0d h=%b", t, op_b, h);
      end
      if (op_a) hits++;
      h = {h[6:1], s1_out, 1'b0};
    end
    checks++;
    if (hits == 0) begin failures++; $display("no match seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
