// tb_collection_module: the collection module at full size (N = 1000,
// 10-bit indices) and a small one (N = 4) for the termination at N.
// Big instance:
//  - four assertions fail in the same cycle and stay failing: they must be
//    stored one per cycle, highest index first, and never again (blocking);
//  - a later single failure is stored in the next free word;
//  - in read mode nothing is written, a pending failure waits and is stored
//    after read mode ends;
//  - read-out after rst_clk: data_out shows the word of the previous
//    address (so address k+1 is on addr_mem when word k is on data_out) and
//    valid is high only for written words; data_out is 0 in write mode.
// Small instance: all four requests stored, then full stays high.
module tb_collection_module;
  localparam int unsigned N = 1000, M = 10;
  logic clk = 0, rst_n = 0, rst_clk = 0, din_user = 0;
  logic [N-1:0] request = '0;
  logic [M-1:0] data_out, addr_mem;
  logic valid, we, full;
  logic [M:0] stored;
  // small instance
  logic [3:0] req_s = '0;
  logic [1:0] dout_s, addr_s;
  logic valid_s, we_s, full_s;
  logic [2:0] stored_s;
  int checks = 0, failures = 0;
  int expect_list [$];

  collection_module #(.N(N), .M(M)) dut (.*);
  collection_module #(.N(4), .M(2)) dut_s (.clk, .rst_n, .rst_clk, .din_user(1'b0),
    .request(req_s), .data_out(dout_s), .addr_mem(addr_s), .valid(valid_s), .we(we_s),
    .full(full_s), .stored(stored_s));

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // expects a write of index idx in the current cycle (inputs settled)
  task automatic expect_write(input int idx, input int at_addr);
    #1;
    chk(we === 1'b1, $sformatf("we for index %0d", idx));
    chk(addr_mem === M'(at_addr), $sformatf("address %0d for index %0d, got %0d", at_addr, idx, addr_mem));
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    #1 chk(we === 1'b0 && stored === '0, "idle after reset");
    // four simultaneous failures, held
    @(negedge clk);
    request[5] = 1; request[900] = 1; request[17] = 1; request[999] = 1;
    req_s = 4'b1111;
    #1 chk(data_out === '0, "data_out is 0 in write mode");
    expect_write(999, 0);
    expect_write(900, 1);
    expect_write(17, 2);
    expect_write(5, 3);
    repeat (3) begin #1 chk(we === 1'b0, "no second store of a blocked assertion"); @(negedge clk); end
    chk(stored === 4, "stored count 4");
    chk(full_s === 1'b1 && stored_s === 3'd4, "small instance full after N results");
    // single new failure
    request[3] = 1;
    expect_write(3, 4);
    // read mode holds off a new failure
    din_user = 1; request[600] = 1;
    repeat (2) begin #1 chk(we === 1'b0, "no write in read mode"); @(negedge clk); end
    din_user = 0;
    // counter moved on during read mode: 4 + 1 + 2 = 7
    expect_write(600, 7);
    // read everything back from address 0
    expect_list = '{999, 900, 17, 5, 3};
    rst_clk = 1; @(negedge clk); rst_clk = 0;
    din_user = 1;
    @(negedge clk);   // word 0 read at this edge
    for (int k = 0; k < 5; k++) begin
      #1;
      chk(data_out === M'(expect_list[k]), $sformatf("read word %0d = %0d, got %0d", k, expect_list[k], data_out));
      chk(addr_mem === M'(k + 1), $sformatf("address %0d while word %0d is shown", k + 1, k));
      chk(valid === 1'b1, $sformatf("valid for word %0d", k));
      @(negedge clk);
    end
    // words 5 and 6 were skipped during read mode, word 7 holds 600
    #1 chk(valid === 1'b1, "word 5 below stored count is reported valid");
    @(negedge clk); @(negedge clk);
    #1 chk(data_out === M'(600), "word 7 = 600");
    @(negedge clk);
    #1 chk(valid === 1'b0, "word 8 not valid");
    din_user = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
