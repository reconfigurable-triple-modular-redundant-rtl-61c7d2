// tb_dual_rail_error: exhaustive check of the dual-rail ERROR generator.
// All eight match patterns: error must be 1 only when no pair matches,
// error_n its complement and rail_fault 0.
module tb_dual_rail_error;
  logic m12, m23, m31, error, error_n, rail_fault;
  int checks = 0, failures = 0;

  dual_rail_error dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {m12, m23, m31} = 3'(v);
      #1;
      checks++;
      if (error !== (v == 0) || error_n !== (v != 0) || rail_fault !== 1'b0) begin
        failures++;
        $display("FAIL pattern %b: error=%b error_n=%b rail_fault=%b", 3'(v), error, error_n, rail_fault);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
