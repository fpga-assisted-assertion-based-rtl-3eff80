// tb_updown_counter_assertions: drives the assertion module directly with
// a counter value that mostly follows a correct up/down counter but is
// sometimes corrupted, so that each of ASR_1..ASR_4 both holds and fails.
// Expected failure bits are computed here from the stimulus history:
//   ASR_1(t) = idle(t-2) && cnt(t-1) != cnt(t-2)
//   ASR_2(t) = en_load(t-2) && cnt(t-1) != load(t-2)
//   ASR_3(t) = !en_load(t-2) && cnt(t-1) == ~cnt(t-2) && cnt(t-1)[7] == cnt(t-1)[0]
//   ASR_4(t) = idle in cycles t-9 .. t
module tb_updown_counter_assertions;
  logic clk = 0, rst_n = 0, en_load = 0, en_ud = 0;
  logic [7:0] load = '0, cnt = '0;
  logic [3:0] asr;
  int checks = 0, failures = 0;
  int fired [4] = '{0, 0, 0, 0};
  // histories, index 1 = previous cycle
  logic [7:0] cnt_h [3], load_h [3];
  logic       idle_h [3], ld_h [3];
  int idle_run = 0;

  updown_counter_assertions #(.WIDTH(8), .IDLE_REP(10)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [3:0] exp;
    logic [7:0] next_cnt;
    int phase;
    foreach (cnt_h[i]) begin cnt_h[i] = '0; load_h[i] = '0; idle_h[i] = 0; ld_h[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    idle_run = 1;   // the clock edge right after reset release already sees an idle cycle
    next_cnt = '0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      phase = t % 200;
      if (phase < 15) begin en_load = 0; en_ud = 0; end                  // long idle
      else if (phase < 20) begin en_load = (phase == 15); en_ud = 1; end // load 0 then count down
      else begin en_load = ($urandom_range(0, 9) == 0); en_ud = ($urandom_range(0, 2) != 0); end
      load = (phase == 15) ? 8'h00 : 8'($urandom);
      cnt  = next_cnt;
      // corrupt the count now and then
      if ($urandom_range(0, 29) == 0) cnt = 8'($urandom);
      if ($urandom_range(0, 59) == 0) cnt = ~cnt_h[1];
      #1;
      exp[0] = idle_h[2] && (cnt_h[1] != cnt_h[2]);
      exp[1] = ld_h[2] && (cnt_h[1] != load_h[2]);
      exp[2] = !ld_h[2] && (cnt_h[1] == ~cnt_h[2]) && (cnt_h[1][7] == cnt_h[1][0]);
      idle_run = (!en_load && !en_ud) ? idle_run + 1 : 0;
      exp[3] = (idle_run >= 10);
      if (t < 2) exp[2:0] = '0;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (asr[k] !== exp[k]) begin failures++; $display("t=%0d ASR_%0d=%0d exp %0d", t, k + 1, asr[k], exp[k]); end
        if (asr[k]) fired[k]++;
      end
      // next correct count from this cycle's (possibly corrupted) count
      next_cnt = en_load ? load : en_ud ? cnt - 1'b1 : cnt;
      for (int i = 2; i > 0; i--) begin
        cnt_h[i] = cnt_h[i-1]; load_h[i] = load_h[i-1]; idle_h[i] = idle_h[i-1]; ld_h[i] = ld_h[i-1];
      end
      cnt_h[1] = cnt; load_h[1] = load; idle_h[1] = !en_load && !en_ud; ld_h[1] = en_load;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (fired[k] == 0) begin failures++; $display("ASR_%0d never failed", k + 1); end
    end
    $display("ASR fail counts %0d %0d %0d %0d", fired[0], fired[1], fired[2], fired[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
