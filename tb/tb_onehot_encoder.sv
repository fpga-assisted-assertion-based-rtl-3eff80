// tb_onehot_encoder: every one-hot input of the full-size encoder (1000
// lines) must give its index; all-zero gives 0.
module tb_onehot_encoder;
  localparam int unsigned N = 1000, M = 10;
  logic [N-1:0] onehot;
  logic [M-1:0] index;
  int checks = 0, failures = 0;

  onehot_encoder #(.N(N), .M(M)) dut (.*);

  initial begin
    #1000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    onehot = '0;
    #1;
    checks++;
    if (index !== '0) begin failures++; $display("zero input gives %0d", index); end
    for (int i = 0; i < int'(N); i++) begin
      onehot = '0;
      onehot[i] = 1'b1;
      #1;
      checks++;
      if (index !== M'(i)) begin failures++; $display("line %0d gives %0d", i, index); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
