// tb_addr_counter: random enable/clear against a modulo-16 reference count.
module tb_addr_counter;
  localparam int unsigned M = 4;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [M-1:0] addr;
  int ref_addr = 0, checks = 0, failures = 0, wraps = 0;

  addr_counter #(.M(M)) dut (.*);

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
      checks++;
      if (addr !== M'(ref_addr)) begin failures++; $display("t=%0d addr=%0d exp=%0d", t, addr, ref_addr); end
      clr = ($urandom_range(0, 49) == 0);
      en  = ($urandom_range(0, 3) != 0);
      if (clr) ref_addr = 0;
      else if (en) begin
        ref_addr = (ref_addr + 1) % (1 << M);
        if (ref_addr == 0) wraps++;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
