// tb_updown_counter: random load/count/hold against an integer model of an
// 8-bit wrapping up/down counter with load priority.
module tb_updown_counter;
  logic clk = 0, rst_n = 0, en_load = 0, en_ud = 0, up = 0;
  logic [7:0] load = '0, cnt;
  int model = 0, checks = 0, failures = 0, wraps = 0;

  updown_counter #(.WIDTH(8)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      checks++;
      if (cnt !== 8'(model)) begin failures++; $display("t=%0d cnt=%0d exp=%0d", t, cnt, model); end
      en_load = ($urandom_range(0, 19) == 0);
      en_ud   = ($urandom_range(0, 3) != 0);
      up      = (t % 600 < 300);
      load    = 8'($urandom);
      if (en_load) model = load;
      else if (en_ud) begin
        model = up ? model + 1 : model - 1;
        if (model < 0 || model > 255) wraps++;
        model = (model + 256) % 256;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
