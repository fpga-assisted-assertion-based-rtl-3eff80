// tb_updown_counter_platform: end-to-end run of the up-down counter
// platform (counter + ASR_1..ASR_4 + 4-entry collection module).
//  1. After reset the counter stays idle: ASR_4 (index 3) fails in the
//     10th idle cycle and is stored at address 0.
//  2. The counter counts down from 0 and wraps to 255: ASR_3 (index 2)
//     fails and is stored at address 1.
//  3. The counter idles again: ASR_4 fails again but is blocked, nothing
//     more is stored.
//  4. rst_clk, then read mode: the words read back are 3 then 2, valid
//     for those two words only.
// Throughout, the count is compared with a model, and ASR_1/ASR_2 (which
// a correct counter never violates) must stay low.
module tb_updown_counter_platform;
  logic clk = 0, rst_n = 0, en_load = 0, en_ud = 0, up = 0, rst_clk = 0, din_user = 0;
  logic [7:0] load = '0, cnt;
  logic [3:0] asr;
  logic [1:0] data_out, addr_mem;
  logic valid, we, full;
  logic [2:0] stored;
  int model = 0, checks = 0, failures = 0;

  updown_counter_platform #(.WIDTH(8), .N(4)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // one cycle of counter stimulus, checked against the model
  task automatic step(input logic ld, input logic ud, input logic dir, input logic [7:0] val);
    @(negedge clk);
    chk(cnt === 8'(model), $sformatf("cnt %0d, model %0d", cnt, model));
    chk(asr[1:0] === 2'b00, "ASR_1/ASR_2 hold for a correct counter");
    en_load = ld; en_ud = ud; up = dir; load = val;
    if (ld) model = val;
    else if (ud) model = ((dir ? model + 1 : model - 1) + 256) % 256;
  endtask

  initial begin
    int asr4_cycle = -1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 1. idle
    for (int i = 0; i < 14; i++) begin
      step(0, 0, 0, 8'h00);
      #1 if (asr[3] && asr4_cycle < 0) asr4_cycle = i;
    end
    chk(asr4_cycle >= 0, "ASR_4 failed after the idle run");
    chk(stored === 3'd1, "ASR_4 stored once");
    // 2. count up 2, then down 3: 0 -> 2 -> 255
    step(0, 1, 1, 0); step(0, 1, 1, 0);
    step(0, 1, 0, 0); step(0, 1, 0, 0); step(0, 1, 0, 0);
    step(1, 0, 0, 8'h40);
    repeat (3) step(0, 1, 1, 0);
    chk(stored === 3'd2, "ASR_3 stored after the underflow");
    // 3. idle again: ASR_4 fails but is blocked
    repeat (12) step(0, 0, 0, 0);
    chk(asr[3] === 1'b1, "ASR_4 failing again");
    chk(stored === 3'd2 && !full, "blocked: still two results");
    // 4. read-out
    @(negedge clk);
    rst_clk = 1; @(negedge clk); rst_clk = 0;
    din_user = 1;
    @(negedge clk);
    #1 chk(data_out === 2'd3 && valid, $sformatf("word 0 = 3 (ASR_4), got %0d", data_out));
    @(negedge clk);
    #1 chk(data_out === 2'd2 && valid, $sformatf("word 1 = 2 (ASR_3), got %0d", data_out));
    @(negedge clk);
    #1 chk(!valid, "word 2 not valid");
    din_user = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
