// tb_oblivious_arbiter: random test of the blocking fixed-priority arbiter
// at its full size (N = 1000).
// Reference model: a set of already-served indices; each cycle the expected
// grant is the highest requesting index not yet served, or none when
// carry_in is low. Requests are dense so that many compete each cycle and
// served requests keep requesting (to exercise the blocking).
module tb_oblivious_arbiter;
  localparam int unsigned N = 1000;
  logic clk = 0, rst_n = 0, carry_in = 0;
  logic [N-1:0] request = '0, grant, block;
  bit   served [N];
  int checks = 0, failures = 0, contended = 0, blocked_seen = 0;

  oblivious_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp_idx, pending;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      carry_in = ($urandom_range(0, 9) != 0);
      for (int i = 0; i < int'(N); i++) request[i] = ($urandom_range(0, 99) < 20);
      #1;
      exp_idx = -1; pending = 0;
      for (int i = int'(N) - 1; i >= 0; i--)
        if (request[i] && !served[i]) begin
          pending++;
          if (exp_idx < 0) exp_idx = i;
        end else if (request[i]) blocked_seen++;
      if (pending > 1) contended++;
      if (!carry_in) exp_idx = -1;
      checks++;
      if (exp_idx < 0 ? (grant != '0) : (grant != (N)'(1) << exp_idx)) begin
        failures++; $display("t=%0d expected grant index %0d", t, exp_idx);
      end
      checks++;
      for (int i = 0; i < int'(N); i++)
        if (block[i] !== !served[i]) begin
          failures++; $display("t=%0d block[%0d]=%0d", t, i, block[i]); break;
        end
      if (exp_idx >= 0) served[exp_idx] = 1'b1;
    end
    checks++;
    if (contended == 0 || blocked_seen == 0) begin failures++; $display("coverage hole"); end
    $display("contended cycles %0d, blocked requests %0d", contended, blocked_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
