// tb_sva_past: random test of $past on an 8-bit bus: op_i(t) = a(t-1).
module tb_sva_past;
  logic clk = 0, rst_n = 0;
  logic [7:0] a = '0, op_i, a_d1 = '0;
  int checks = 0, failures = 0;

  sva_past #(.W(8)) dut (.*);

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
      a = 8'($urandom);
      #1;
      checks++;
      if (op_i !== a_d1) begin failures++; $display("t=%0d op_i=%h exp=%h", t, op_i, a_d1); end
      a_d1 = a;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
