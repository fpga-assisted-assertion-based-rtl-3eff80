// tb_sva_if: exhaustive test of "if (expr) p1 else p2" and "if (expr) p1".
module tb_sva_if;
  logic expr, p1_out, p2_out, op_else, op_noelse;
  int checks = 0, failures = 0;

  sva_if #(.HAS_ELSE(1'b1)) dut_else   (.expr, .p1_out, .p2_out, .op_i(op_else));
  sva_if #(.HAS_ELSE(1'b0)) dut_noelse (.expr, .p1_out, .p2_out, .op_i(op_noelse));

  initial begin
    #100000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {expr, p1_out, p2_out} = 3'(v);
      #1;
      checks += 2;
      if (op_else !== (expr ? p1_out : p2_out)) begin
        failures++; $display("else: v=%0d op=%0d", v, op_else);
      end
      if (op_noelse !== (expr && p1_out)) begin
        failures++; $display("no else: v=%0d op=%0d", v, op_noelse);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
