// tb_collection_workload: the collection module at the three sizes the
// platform was evaluated with on its largest design, 100, 500 and 1000
// assertions (7, 9 and 10-bit indices), each filled to capacity by
// collection_workload_runner and read back completely.
module tb_collection_workload;
  logic clk = 0, rst_n = 0;
  int c [3], f [3];
  bit d [3];
  int checks, failures;

  collection_workload_runner #(.N(100))  r100  (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .done(d[0]));
  collection_workload_runner #(.N(500))  r500  (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .done(d[1]));
  collection_workload_runner #(.N(1000)) r1000 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .done(d[2]));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    checks = c[0] + c[1] + c[2]; failures = f[0] + f[1] + f[2] + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (d[0] && d[1] && d[2]);
    checks = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    $display("checks per size: %0d %0d %0d", c[0], c[1], c[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
