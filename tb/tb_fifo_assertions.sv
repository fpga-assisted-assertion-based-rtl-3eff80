// tb_fifo_assertions: drives the FIFO assertion module with the flags and
// fill level of a correct 16-entry FIFO model, corrupted now and then, so
// that every one of the ten checkers both holds and fails. The expected
// failure bits are computed here from the stimulus history (h1 = previous
// cycle, h2 = the one before):
//   0: h1.full && h1.count != 16         1: h1.empty && h1.count != 0
//   2: h1.empty != (h1.count == 0)
//   3: push_only(h2) && h1.count != h2.count + 1
//   4: pop_only(h2)  && h1.count != h2.count - 1
//   5: idle(h2)      && h1.count != h2.count
//   6: wr_en && full in this and the 3 cycles before
//   7: empty now && push_only(h1) && h1.empty
//   8: a cycle with full && empty was seen, and since then no cycle with
//      neither flag (evaluated up to the previous cycle)
//   9: rd_en && empty now, and it is the 4th, 8th, ... such cycle
module tb_fifo_assertions;
  localparam int unsigned DEPTH = 16, CW = 5;
  typedef struct { logic wr, rd, full, empty; logic [CW-1:0] count; } smp_t;

  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, full = 0, empty = 1;
  logic [CW-1:0] count = '0;
  logic [9:0] asr, exp;
  smp_t h1, h2, cur;
  int model = 0, ovf_run = 0, unf_total = 0, checks = 0, failures = 0;
  bit fe_flag = 0;
  int fired [10];

  fifo_assertions #(.DEPTH(DEPTH)) dut (.*);

  function automatic bit push_only(smp_t s); return s.wr && !s.rd && !s.full; endfunction
  function automatic bit pop_only(smp_t s);  return s.rd && !s.wr && !s.empty; endfunction

  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (fired[k]) fired[k] = 0;
    h1 = '{wr: 0, rd: 0, full: 0, empty: 1, count: '0};   // cycle seen at reset release
    h2 = '{wr: 0, rd: 0, full: 0, empty: 0, count: '0};   // reset state of the checkers
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      wr_en = (t % 300 < 150) ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 9) < 2);
      rd_en = (t % 300 < 150) ? ($urandom_range(0, 9) < 2) : ($urandom_range(0, 9) < 8);
      count = CW'(model);
      full  = (model == DEPTH);
      empty = (model == 0);
      case ($urandom_range(0, 79))
        0: full  = !full;
        1: empty = !empty;
        2: count = CW'($urandom);
        3: count = count + 1'b1;
        default: ;
      endcase
      cur = '{wr: wr_en, rd: rd_en, full: full, empty: empty, count: count};
      #1;
      ovf_run = (wr_en && full) ? ovf_run + 1 : 0;
      if (rd_en && empty) unf_total++;
      exp[0] = h1.full && h1.count != CW'(DEPTH);
      exp[1] = h1.empty && h1.count != '0;
      exp[2] = h1.empty != (h1.count == '0);
      exp[3] = push_only(h2) && h1.count != h2.count + 1'b1;
      exp[4] = pop_only(h2)  && h1.count != h2.count - 1'b1;
      exp[5] = !h2.wr && !h2.rd && h1.count != h2.count;
      exp[6] = ovf_run >= 4;
      exp[7] = empty && push_only(h1) && h1.empty;
      exp[8] = fe_flag;
      exp[9] = rd_en && empty && (unf_total % 4 == 0);
      for (int k = 0; k < 10; k++) begin
        checks++;
        if (asr[k] !== exp[k]) begin failures++; $display("t=%0d asr[%0d]=%0d exp %0d", t, k, asr[k], exp[k]); end
        if (asr[k]) fired[k]++;
      end
      // checker state for the next cycle
      if (!full && !empty) fe_flag = 0;
      else if (full && empty) fe_flag = 1;
      h2 = h1; h1 = cur;
      // correct FIFO model
      model = model + ((wr_en && model < DEPTH) ? 1 : 0) - ((rd_en && model > 0) ? 1 : 0);
    end
    for (int k = 0; k < 10; k++) begin
      checks++;
      if (fired[k] == 0) begin failures++; $display("asr[%0d] never failed", k); end
    end
    $display("fail counts %p", fired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
