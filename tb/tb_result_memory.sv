// tb_result_memory: random writes and reads against an array model; reads
// have one clock of latency and dout holds while re is low.
module tb_result_memory;
  localparam int unsigned M = 4, W = 8;
  logic clk = 0, we = 0, re = 0;
  logic [M-1:0] addr = '0;
  logic [W-1:0] din = '0, dout, model [2**M], exp_dout;
  bit   written [2**M];
  int checks = 0, failures = 0;

  result_memory #(.M(M), .W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit exp_valid;
    // fill every word once so reads are defined
    for (int i = 0; i < 2**M; i++) begin
      @(negedge clk);
      we = 1; re = 0; addr = M'(i); din = W'($urandom);
      model[i] = din;
    end
    exp_valid = 0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      if (exp_valid) begin
        checks++;
        if (dout !== exp_dout) begin failures++; $display("t=%0d dout=%h exp=%h", t, dout, exp_dout); end
      end
      we = ($urandom_range(0, 2) == 0);
      re = ($urandom_range(0, 1) == 0);
      addr = M'($urandom);
      din = W'($urandom);
      if (re) begin exp_dout = model[addr]; exp_valid = 1; end
      if (we) model[addr] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
