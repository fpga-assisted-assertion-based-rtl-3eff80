// collection_workload_runner: drives one collection module of N inputs
// with N assertion failures that start at random times (several in the
// same cycle) and stay failing, as a checker of a persistent error does.
// An independent model (highest index first among the not yet stored,
// one per cycle) predicts the order of the stored indices. The runner
// checks that all N are stored, that collection then terminates (full,
// no further writes), that the whole memory reads back in the predicted
// order after rst_clk, and that the store rate is one result per cycle
// whenever failures are pending. It reports its counts on its ports.
module collection_workload_runner #(
  parameter int unsigned N = 100,
  parameter int unsigned SPREAD = 2 * N   // failures start in [0, SPREAD)
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam int unsigned M = $clog2(N);
  logic [N-1:0] request;
  logic rst_clk, din_user, valid, we, full;
  logic [M-1:0] data_out, addr_mem;
  logic [M:0] stored;
  int start [N];
  bit served [N];
  int order [$];

  collection_module #(.N(N), .M(M)) dut (.*);

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("N=%0d FAIL %s (t=%0t)", N, what, $time); end
  endtask

  initial begin
    int cyc, pick, idle_pending;
    checks = 0; failures = 0; done = 0;
    request = '0; rst_clk = 0; din_user = 0;
    foreach (start[i]) start[i] = $urandom_range(0, SPREAD - 1);
    @(posedge rst_n);
    cyc = 0; idle_pending = 0;
    while (order.size() < int'(N)) begin
      @(negedge clk);
      for (int i = 0; i < int'(N); i++) if (start[i] <= cyc) request[i] = 1'b1;
      #1;
      pick = -1;
      for (int i = int'(N) - 1; i >= 0; i--) if (request[i] && !served[i]) begin pick = i; break; end
      if (pick >= 0) begin
        served[pick] = 1; order.push_back(pick);
        if (!we) idle_pending++;
      end
      cyc++;
    end
    @(negedge clk);
    #1 chk(idle_pending == 0, "one result stored in every cycle with a pending failure");
    chk(full && int'(stored) == int'(N), "all N results stored, collection full");
    repeat (3) begin @(negedge clk); #1 chk(!we, "no write after termination"); end
    rst_clk = 1; @(negedge clk); rst_clk = 0; din_user = 1;
    @(negedge clk);
    foreach (order[k]) begin
      #1 if (!(valid && data_out === M'(order[k]))) chk(0, $sformatf("word %0d = %0d, got %0d", k, order[k], data_out));
      else checks++;
      @(negedge clk);
    end
    din_user = 0;
    done = 1;
  end
endmodule
