// tb_sync_2ff: self-checking test of the two-flop synchronizer. A random
// input word changes at each clock; q must equal the input of two edges
// earlier, and must show RESET_VAL during and right after reset. Prints
// TB_RESULT and has a watchdog.
module tb_sync_2ff;
  localparam int unsigned W = 3;
  localparam logic [W-1:0] RV = 3'b101;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d = '0, q, d1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sync_2ff #(.W(W), .RESET_VAL(RV)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: q=%b at %0t", what, q, $time);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(q == RV, "reset value");
    @(negedge clk) rst_n = 1'b1;
    d1 = RV;  // model of the first flop
    for (int i = 0; i < 200; i++) begin
      d = W'($urandom);
      @(negedge clk);
      // at the edge just passed, q took the first flop's value
      check(q == d1, "q is the input of two edges earlier");
      d1 = d;
    end
    rst_n = 1'b0;
    #1 check(q == RV, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
