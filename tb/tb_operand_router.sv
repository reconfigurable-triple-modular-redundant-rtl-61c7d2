// tb_operand_router: random Read-stage bundles and random S, P selections;
// each Execute input must be the fetching processor's bundle when its P bit
// is set and its own bundle otherwise.
module tb_operand_router;
  import rq_pkg::*;
  issue_t     rd_out [NCORE];
  issue_t     ex_in  [NCORE];
  logic [1:0] sel_s;
  logic [3:0] sel_p;
  int checks = 0, failures = 0;

  operand_router dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 300; k++) begin
      for (int i = 0; i < NCORE; i++) begin
        rd_out[i].valid = 1'($urandom);
        rd_out[i].op    = opcode_e'(4'($urandom % 9));
        rd_out[i].rd    = 4'($urandom);
        rd_out[i].we    = 1'($urandom);
        rd_out[i].a     = $urandom;
        rd_out[i].b     = $urandom;
      end
      sel_s = 2'($urandom);
      sel_p = 4'($urandom);
      #1;
      for (int i = 0; i < NCORE; i++) begin
        checks++;
        if (ex_in[i] !== (sel_p[i] ? rd_out[sel_s] : rd_out[i])) begin
          failures++;
          $display("FAIL core %0d s=%0d p=%b", i, sel_s, sel_p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
