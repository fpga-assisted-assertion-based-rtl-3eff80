// tb_sva_and: directed scenarios for "s1 and s2".
// 1) both start together, s1 matches after 1 cycle, s2 after 3: op_i
//    must rise the cycle after s2's match and clear once both are off.
// 2) s1 and s2 start in different cycles: op_i must stay low.
// 3) both start together but only s1 matches: op_i must stay low.
// Each step lists the inputs of one cycle and the op_i expected in it.
module tb_sva_and;
  logic clk = 0, rst_n = 0;
  logic s1_on = 0, s1_out = 0, s1_off = 1, s2_on = 0, s2_out = 0, s2_off = 1, op_i;
  int checks = 0, failures = 0;

  sva_and dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // {s1_on,s1_out,s1_off, s2_on,s2_out,s2_off, expected op_i}
  typedef struct packed { logic [5:0] in; logic exp; } step_t;
  step_t seq [$];

  task automatic add(input logic [5:0] in, input logic exp);
    seq.push_back('{in, exp});
  endtask

  initial begin
    // scenario 1
    add(6'b100_100, 0);  // both start
    add(6'b010_000, 0);  // s1 matches, s2 running
    add(6'b001_000, 0);  // s1 done, s2 running
    add(6'b001_010, 0);  // s2 matches
    add(6'b001_001, 1);  // both off: op_i shows the match, then clears
    add(6'b001_001, 0);
    // scenario 2
    add(6'b100_001, 0);
    add(6'b010_100, 0);
    add(6'b001_010, 0);
    add(6'b001_001, 0);
    add(6'b001_001, 0);
    // scenario 3
    add(6'b100_100, 0);
    add(6'b010_000, 0);
    add(6'b001_000, 0);
    add(6'b001_000, 0);
    add(6'b001_001, 0);
    add(6'b001_001, 0);
    // scenario 1 again with the matches in the other order
    add(6'b100_100, 0);
    add(6'b000_010, 0);
    add(6'b010_001, 0);
    add(6'b001_001, 1);
    add(6'b001_001, 0);

    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (seq[i]) begin
      @(negedge clk);
      {s1_on, s1_out, s1_off, s2_on, s2_out, s2_off} = seq[i].in;
      #1;
      checks++;
      if (op_i !== seq[i].exp) begin
        failures++; $display("step %0d: op_i=%0d expected %0d", i, op_i, seq[i].exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
