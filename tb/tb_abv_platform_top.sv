// tb_abv_platform_top: end-to-end run of the whole design at its default
// parameters (no parameter override on the top).
// Up-down counter platform: the run starts in read mode while the counter
// idles, so ASR_4 fails but cannot be stored; it is stored as soon as read
// mode ends (collection held off, then resumed; rst_clk first returns the
// address counter, which advanced while reading, to 0). Then a count-down
// through 0 makes ASR_3 fail, and a second idle run makes ASR_4 fail
// again, which the blocking logic keeps out of memory.
// Multiple-FIFO platform (three FIFOs on three unrelated clocks):
// all-empty after reset, fill and overflow of all three FIFOs, all-full,
// then read mode while the FIFOs drain (data checked) and underflow; the
// underflow failures stay pending across the clock crossing and compete
// for the arbiter when read mode ends. Finally one FIFO is reset on its
// own.
// Both collection modules are then read back after rst_clk and compared
// with independent models of the collection (highest index first, each
// index once, nothing while din_user is high, own address counter). Each mechanism is counted
// and one that never happened counts as a failure. Termination of the
// collection at N results is not reachable here: correct counters and
// FIFOs never violate the remaining assertions.
module tb_abv_platform_top;
  import abv_pkg::*;
  localparam int unsigned UM = $clog2(UD_ASSERTIONS), FM = $clog2(MF_ASSERTIONS);

  logic clk = 0, rst_n = 0;
  logic ud_en_load = 0, ud_en_ud = 0, ud_up = 0, ud_rst_clk = 0, ud_din_user = 0;
  logic [UD_WIDTH-1:0] ud_load = '0, ud_cnt;
  logic [UD_ASSERTIONS-1:0] ud_asr;
  logic [UM-1:0] ud_data_out, ud_addr_mem;
  logic ud_valid, ud_we, ud_full;
  logic [UM:0] ud_stored;
  logic [NUM_FIFOS-1:0] mf_fifo_clk = '0, mf_fifo_rst_n = '1, mf_wr_en, mf_rd_en, mf_fifo_full, mf_fifo_empty;
  logic [NUM_FIFOS-1:0][FIFO_WIDTH-1:0] mf_din, mf_dout;
  logic [MF_ASSERTIONS-1:0] mf_asr, mf_request;
  logic mf_rst_clk = 0, mf_din_user = 0;
  logic [FM-1:0] mf_data_out, mf_addr_mem;
  logic mf_valid, mf_we, mf_full;
  logic [FM:0] mf_stored;

  abv_platform_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_contention = 0, n_blocked = 0, n_held_in_read = 0, n_resumed = 0;
  int n_rst_clk = 0, n_readout = 0, n_fifo_reset = 0, n_we = 0;
  int n_asr3 = 0, n_asr4 = 0, n_all_full = 0, n_all_empty = 0, n_overflow = 0, n_underflow = 0;

  bit ud_served [UD_ASSERTIONS], mf_served [MF_ASSERTIONS];
  int ud_list [$];
  int mf_mem [int];
  int mf_addr = 0, mf_n = 0;

  always #5 clk = ~clk;
  always #7 mf_fifo_clk[0] = ~mf_fifo_clk[0];
  always #3 mf_fifo_clk[1] = ~mf_fifo_clk[1];
  always #11 mf_fifo_clk[2] = ~mf_fifo_clk[2];

  logic go_fill = 0, go_drain = 0;
  bit   filled [3], drained [3];
  int   tc [3], tf [3];
  for (genvar k = 0; k < 3; k++) begin : g_tr
    fifo_traffic u_tr (.fclk(mf_fifo_clk[k]), .go_fill, .go_drain, .wr_en(mf_wr_en[k]),
      .rd_en(mf_rd_en[k]), .din(mf_din[k]), .dout(mf_dout[k]), .filled(filled[k]),
      .drained(drained[k]), .checks(tc[k]), .failures(tf[k]));
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

  // independent collection models, evaluated before each rising edge
  always @(posedge clk) if (rst_n) begin
    int pick, pending;
    pick = -1; pending = 0;
    for (int i = UD_ASSERTIONS - 1; i >= 0; i--) begin
      if (ud_asr[i] && ud_served[i]) n_blocked++;
      if (ud_asr[i] && !ud_served[i]) begin pending++; if (pick < 0) pick = i; end
    end
    if (pending > 0 && ud_din_user) n_held_in_read++;
    if (pick >= 0 && !ud_din_user) begin
      ud_served[pick] = 1; ud_list.push_back(pick);
      if (ud_list.size() == 1 && n_held_in_read > 0) n_resumed++;
    end
    pick = -1; pending = 0;
    for (int i = MF_ASSERTIONS - 1; i >= 0; i--) begin
      if (mf_request[i] && mf_served[i]) n_blocked++;
      if (mf_request[i] && !mf_served[i]) begin pending++; if (pick < 0) pick = i; end
    end
    if (!mf_din_user) begin
      if (pending > 1) n_contention++;
      if (pick >= 0) begin mf_served[pick] = 1; mf_mem[mf_addr] = pick; mf_n++; end
    end else begin
      if (pending > 0) n_held_in_read++;
      pick = -1;
    end
    if (mf_rst_clk) mf_addr = 0;
    else if (pick >= 0 || mf_din_user) mf_addr = (mf_addr + 1) % (1 << FM);
    if (ud_we) n_we++;
    if (mf_we) n_we++;
    if (ud_asr[2]) n_asr3++;
    if (ud_asr[3]) n_asr4++;
    if (mf_asr[MF_IDX_ALL_FULL]) n_all_full++;
    if (mf_asr[MF_IDX_ALL_EMPTY]) n_all_empty++;
    for (int k = 0; k < int'(NUM_FIFOS); k++) begin
      if (mf_asr[k*FIFO_ASSERTIONS + 6]) n_overflow++;
      if (mf_asr[k*FIFO_ASSERTIONS + 9]) n_underflow++;
    end
  end

  // properties a correct DUV never violates must stay quiet
  always @(negedge clk) if (rst_n) begin
    if (ud_asr[1:0] != 2'b00) begin failures++; $display("ASR_1/2 failed at %0t", $time); end
    for (int k = 0; k < int'(NUM_FIFOS); k++)
      for (int a = 0; a < int'(FIFO_ASSERTIONS); a++)
        if (!(a == 6 || a == 9) && mf_asr[k*FIFO_ASSERTIONS + a]) begin
          failures++; $display("FIFO %0d checker %0d failed at %0t", k, a, $time);
        end
  end

  // ---------------- up-down counter platform ----------------
  int ud_model = 0;
  task automatic ud_step(input logic ld, input logic ud, input logic dir, input logic [7:0] val);
    @(negedge clk);
    chk(ud_cnt === 8'(ud_model), $sformatf("cnt %0d, model %0d", ud_cnt, ud_model));
    ud_en_load = ld; ud_en_ud = ud; ud_up = dir; ud_load = val;
    if (ld) ud_model = val;
    else if (ud) ud_model = ((dir ? ud_model + 1 : ud_model - 1) + 256) % 256;
  endtask

  task automatic run_ud();
    ud_din_user = 1;                       // start in read mode
    repeat (14) ud_step(0, 0, 0, 0);       // ASR_4 fails while reading
    chk(ud_stored === '0, "nothing stored in read mode");
    // reading moved the address counter: clear it before collection resumes
    ud_rst_clk = 1; n_rst_clk++;
    ud_step(0, 0, 0, 0);
    ud_rst_clk = 0;
    ud_din_user = 0;
    ud_step(0, 0, 0, 0);
    ud_step(0, 1, 1, 0);
    chk(ud_stored === 1, "ASR_4 stored once read mode ended");
    ud_step(1, 0, 0, 8'h01);
    repeat (3) ud_step(0, 1, 0, 0);        // 1 -> 0 -> 255 -> 254
    repeat (2) ud_step(0, 1, 1, 0);
    chk(ud_stored === 2, "ASR_3 stored after the underflow");
    repeat (12) ud_step(0, 0, 0, 0);       // ASR_4 again, blocked
    chk(ud_stored === 2, "repeated ASR_4 blocked");
    // read-out
    @(negedge clk); ud_rst_clk = 1; n_rst_clk++;
    @(negedge clk); ud_rst_clk = 0; ud_din_user = 1;
    @(negedge clk);
    foreach (ud_list[i]) begin
      #1 chk(ud_valid && ud_data_out === UM'(ud_list[i]),
             $sformatf("counter word %0d = %0d, got %0d", i, ud_list[i], ud_data_out));
      n_readout++;
      @(negedge clk);
    end
    #1 chk(!ud_valid, "counter: no valid word past the results");
    chk(ud_list.size() == 2 && ud_list[0] == 3 && ud_list[1] == 2, "counter results are ASR_4, ASR_3");
    ud_din_user = 0;
  endtask

  // ---------------- multiple-FIFO platform ----------------
  task automatic run_mf();
    repeat (6) @(negedge clk);
    chk(mf_served[MF_IDX_ALL_EMPTY], "ALL_EMPTY stored after reset");
    go_fill = 1;
    wait (filled[0] && filled[1] && filled[2]);
    repeat (8) @(negedge clk);
    chk(mf_fifo_full === '1, "all FIFOs full");
    chk(mf_served[6] && mf_served[16] && mf_served[26] && mf_served[MF_IDX_ALL_FULL],
        "overflow and ALL_FULL failures stored");
    mf_din_user = 1;                       // read mode while draining
    go_drain = 1;
    wait (drained[0] && drained[1] && drained[2]);
    repeat (8) @(negedge clk);
    chk(!mf_served[9] && !mf_served[19] && !mf_served[29], "underflow failures held in read mode");
    mf_din_user = 0;
    repeat (6) @(negedge clk);
    chk(mf_served[9] && mf_served[19] && mf_served[29], "underflow failures stored after read mode");
    mf_fifo_rst_n = 3'b011; @(negedge clk); mf_fifo_rst_n = '1; n_fifo_reset++;
    #1 chk(mf_fifo_empty[2], "FIFO 2 emptied by its own reset");
    repeat (4) @(negedge clk);
    chk(int'(mf_stored) == mf_n && mf_n == 8, "FIFO platform stored count");
    for (int k = 0; k < 3; k++) begin checks += tc[k]; failures += tf[k]; end
    mf_rst_clk = 1; n_rst_clk++; @(negedge clk); mf_rst_clk = 0; mf_din_user = 1;
    @(negedge clk);
    for (int a = 0; a < (1 << FM); a++) begin
      #1 chk(mf_valid === (a < mf_n), $sformatf("FIFO platform valid for word %0d", a));
      if (mf_mem.exists(a)) begin
        chk(mf_data_out === FM'(mf_mem[a]), $sformatf("FIFO word %0d = %0d, got %0d", a, mf_mem[a], mf_data_out));
        n_readout++;
      end
      @(negedge clk);
    end
    mf_din_user = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      run_ud();
      run_mf();
    join
    begin
      string names [14] = '{"contention", "blocking", "held in read mode", "resumed after read mode",
                            "rst_clk", "read-out word", "per-FIFO reset", "write", "ASR_3", "ASR_4",
                            "ALL_FULL", "ALL_EMPTY", "FIFO overflow run", "FIFO underflow goto"};
      int counts [14];
      counts = '{n_contention, n_blocked, n_held_in_read, n_resumed, n_rst_clk, n_readout,
                 n_fifo_reset, n_we, n_asr3, n_asr4, n_all_full, n_all_empty, n_overflow, n_underflow};
      foreach (counts[i]) begin
        $display("mechanism %-24s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
