// tb_sva_stable: random test of $stable on a 3-bit bus (small so that equal
// successive values are frequent): op_i(t) = (a(t) == a(t-1)).
module tb_sva_stable;
  logic clk = 0, rst_n = 0, op_i;
  logic [2:0] a = '0, a_d1 = '0;
  int checks = 0, failures = 0, stable_seen = 0, change_seen = 0;

  sva_stable #(.W(3)) dut (.*);

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
      a = 3'($urandom);
      #1;
      checks++;
      if (op_i !== (a == a_d1)) begin failures++; $display("t=%0d a=%0d old=%0d op=%0d", t, a, a_d1, op_i); end
      if (a == a_d1) stable_seen++; else change_seen++;
      a_d1 = a;
    end
    checks++;
    if (stable_seen == 0 || change_seen == 0) begin failures++; $display("coverage hole"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
