// tb_multi_fifo_platform: end-to-end run of the multiple-FIFO platform
// (three FIFOs on three unrelated clocks, 32 checkers, 32-entry collection
// module on clk).
// Scenario: after reset all FIFOs are empty (ALL_EMPTY, index 31). All
// three are filled and written on while full (the "four overflow attempts
// in a row" checkers 6, 16, 26 fail) and ALL_FULL (index 30) fails. The
// collection is then put in read mode while the FIFOs are drained (data
// checked by fifo_traffic) and read while empty four times (checkers 9,
// 19, 29 fail with one-cycle pulses in their own domains): the crossing
// keeps them pending, and when read mode ends they compete for the
// arbiter in the same cycles. FIFO 1 is finally reset on its own reset.
// An independent model of the collection (highest pending index first,
// each index once, none in read mode, with its own address counter) is
// fed with the request vector; the memory read back after rst_clk must
// hold the model's words at the model's addresses (the counter also
// advanced during read mode, so the later words are not contiguous). Checkers of correct
// FIFO behaviour (0-5, 7, 8 of each FIFO) must never fail.
module tb_multi_fifo_platform;
  import abv_pkg::*;
  localparam int unsigned N = MF_ASSERTIONS, M = 5;
  logic clk = 0, rst_n = 0, rst_clk = 0, din_user = 0;
  logic [NUM_FIFOS-1:0] fifo_clk = '0, fifo_rst_n = '1, wr_en, rd_en, fifo_full, fifo_empty;
  logic [NUM_FIFOS-1:0][7:0] din, dout;
  logic [N-1:0] asr, request;
  logic [M-1:0] data_out, addr_mem;
  logic valid, we, full;
  logic [M:0] stored;
  logic go_fill = 0, go_drain = 0;
  bit   filled [3], drained [3];
  int   tc [3], tf [3];
  int checks = 0, failures = 0, contended = 0;
  bit served [N];
  int mem_model [int];
  int addr_model = 0, n_model = 0;

  multi_fifo_platform #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always #7 fifo_clk[0] = ~fifo_clk[0];
  always #3 fifo_clk[1] = ~fifo_clk[1];
  always #11 fifo_clk[2] = ~fifo_clk[2];

  for (genvar k = 0; k < 3; k++) begin : g_tr
    fifo_traffic u_tr (.fclk(fifo_clk[k]), .go_fill, .go_drain, .wr_en(wr_en[k]), .rd_en(rd_en[k]),
      .din(din[k]), .dout(dout[k]), .filled(filled[k]), .drained(drained[k]),
      .checks(tc[k]), .failures(tf[k]));
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // collection model, evaluated just before every rising edge of clk
  always @(posedge clk) if (rst_n) begin
    int pick, pending;
    pick = -1; pending = 0;
    for (int i = int'(N) - 1; i >= 0; i--)
      if (request[i] && !served[i]) begin pending++; if (pick < 0) pick = i; end
    if (!din_user && n_model < int'(N)) begin
      if (pending > 1) contended++;
      if (pick >= 0) begin served[pick] = 1; mem_model[addr_model] = pick; n_model++; end
    end else pick = -1;
    if (rst_clk) addr_model = 0;
    else if (pick >= 0 || din_user) addr_model = (addr_model + 1) % (1 << M);
  end

  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < int'(NUM_FIFOS); k++)
      for (int a = 0; a < 10; a++)
        if (!(a == 6 || a == 9) && asr[k*10 + a]) begin
          failures++; $display("checker %0d of FIFO %0d failed at %0t", a, k, $time);
        end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (6) @(negedge clk);
    chk(served[MF_IDX_ALL_EMPTY], "ALL_EMPTY stored after reset");
    go_fill = 1;
    wait (filled[0] && filled[1] && filled[2]);
    repeat (8) @(negedge clk);
    chk(fifo_full === '1, "all FIFOs full");
    chk(served[6] && served[16] && served[26], "overflow checkers stored");
    chk(served[MF_IDX_ALL_FULL], "ALL_FULL stored");
    // read mode while the FIFOs drain and underflow
    din_user = 1;
    go_drain = 1;
    wait (drained[0] && drained[1] && drained[2]);
    repeat (8) @(negedge clk);
    chk(request[9] && request[19] && request[29], "underflow failures pending in read mode");
    chk(!served[9] && !served[19] && !served[29] && !we, "nothing stored in read mode");
    din_user = 0;
    repeat (6) @(negedge clk);
    chk(served[9] && served[19] && served[29], "underflow failures stored after read mode");
    chk(contended > 0, "simultaneous failures arbitrated");
    // own reset of FIFO 1
    fifo_rst_n = 3'b101; @(negedge clk); fifo_rst_n = '1;
    #1 chk(fifo_empty[1] && !fifo_full[1], "FIFO 1 reset on its own reset");
    repeat (4) @(negedge clk);
    chk(!request[19] && request[9] && request[29], "only FIFO 1's pending failures cleared by its reset");
    chk(int'(stored) == n_model && n_model == 8, $sformatf("stored %0d, model %0d", stored, n_model));
    for (int k = 0; k < 3; k++) begin checks += tc[k]; failures += tf[k]; end
    // read-out of the whole memory
    rst_clk = 1; @(negedge clk); rst_clk = 0;
    din_user = 1;
    @(negedge clk);
    for (int a = 0; a < (1 << M); a++) begin
      // valid compares the address with the number of stored results
      #1 chk(valid === (a < n_model), $sformatf("valid for word %0d", a));
      if (mem_model.exists(a))
        chk(data_out === M'(mem_model[a]), $sformatf("word %0d = %0d, got %0d", a, mem_model[a], data_out));
      @(negedge clk);
    end
    din_user = 0;
    $display("model memory: %p", mem_model);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
