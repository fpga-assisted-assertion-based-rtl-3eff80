// tb_sva_goto_rep: random test of the s1[->N:M] checker (N=2, M=4).
// Reference: number the occurrences of s1 since reset 1, 2, 3, ... and
// restart after every M-th; op_i must be high exactly in the cycles of the
// N-th..M-th occurrence, whatever the gaps between occurrences.
module tb_sva_goto_rep;
  localparam int unsigned N = 2, M = 4;
  logic clk = 0, rst_n = 0, s1_out = 0, op_i;
  int checks = 0, failures = 0, total = 0, hits = 0;

  sva_goto_rep #(.N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int nth;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      s1_out = ($urandom_range(0, 99) < 35);
      #1;
      nth = s1_out ? (total % M) + 1 : 0;
      checks++;
      if (op_i !== (s1_out && nth >= N && nth <= M)) begin
        failures++;
        $display("t=%0d s1=%0d occurrence=%0d op_i=%0d", t, s1_out, nth, op_i);
      end
      if (op_i) hits++;
      if (s1_out) total++;
    end
    checks++;
    if (hits == 0) begin failures++; $display("no match seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
