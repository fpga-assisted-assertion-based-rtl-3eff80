// tb_sva_consec_rep: random test of the s1[*N:M] checker (N=2, M=4).
// Reference: op_i must be high exactly when s1 is high now and s1 has been
// high for at least N cycles in a row ending now (a longer run still
// contains an N..M match ending now). The run length is tracked here from
// the stimulus, independently of the checker's counter.
module tb_sva_consec_rep;
  localparam int unsigned N = 2, M = 4;
  logic clk = 0, rst_n = 0, s1_out = 0, op_i;
  int checks = 0, failures = 0, run = 0, hits = 0;

  sva_consec_rep #(.N(N), .M(M)) dut (.*);

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
      // long runs now and then so that runs beyond M occur
      s1_out = (t % 50 < 8) ? 1'b1 : ($urandom_range(0, 99) < 60);
      #1;
      checks++;
      if (op_i !== (s1_out && (run + 1 >= N))) begin
        failures++;
        $display("t=%0d s1=%0d run=%0d op_i=%0d", t, s1_out, run, op_i);
      end
      if (op_i) hits++;
      run = s1_out ? run + 1 : 0;
    end
    checks++;
    if (hits == 0) begin failures++; $display("no match seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
