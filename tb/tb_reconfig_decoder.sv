// tb_reconfig_decoder: builds RECONFIG words from random fields (bit layout
// written out here independently of the package helper), checks every
// decoded field and the EN0..EN3 one-hot output, RECONFIG OFF (all zero
// fields, no enable) and that other opcodes are not taken for RECONFIG.
module tb_reconfig_decoder;
  import rq_pkg::*;
  logic [15:0] instr;
  logic        is_reconfig;
  rcfg_t       fields;
  logic [3:0]  en;
  int checks = 0, failures = 0;

  reconfig_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic on, s1, s0, p0, p1, p2, p3, v1, v0;
    logic [3:0] exp_en;
    for (int k = 0; k < 600; k++) begin
      {on, s1, s0, p0, p1, p2, p3, v1, v0} = 9'($urandom);
      if (k % 10 == 0) {on, s1, s0, p0, p1, p2, p3, v1, v0} = '0;
      instr = {4'hE, 3'b000, on, s1, s0, p0, p1, p2, p3, v1, v0};
      if (k % 4 == 3) instr[15:12] = 4'($urandom % 14);
      exp_en = on ? (4'b0001 << {v1, v0}) : 4'b0000;
      #1;
      checks++;
      if (is_reconfig !== (instr[15:12] == 4'hE) || fields.on !== on || fields.s !== {s1, s0} ||
          fields.p !== {p3, p2, p1, p0} || fields.v !== vl_e'({v1, v0}) || en !== exp_en) begin
        failures++;
        $display("FAIL instr=%h: on=%b s=%b p=%b v=%0d en=%b exp_en=%b", instr, fields.on, fields.s, fields.p, fields.v, en, exp_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
