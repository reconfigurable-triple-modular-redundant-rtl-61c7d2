// reconfig_decoder: decodes the RECONFIG instruction.
//
// Extracts the reliability-zone fields ON, S1 S0 (processor that fetches
// while the redundant mode is on), P0..P3 (processors taking part) and V1 V0
// (voting logic), and drives the 2-4 decoder EN0..EN3 that enables one
// voting logic; the decoder is enabled by ON, so RECONFIG OFF (all fields 0)
// enables none. Field order follows the instruction format; the bit
// positions (ON = 8, S1 S0 = 7:6, P0..P3 = 5:2, V1 V0 = 1:0, opcode =
// 15:12, bits 11:9 unused) are this design's choice. Combinational.
module reconfig_decoder
  import rq_pkg::*;
(
  input  logic [ILEN-1:0] instr,
  output logic            is_reconfig,
  output rcfg_t           fields,
  output logic [3:0]      en
);
  always_comb begin
    is_reconfig = (instr[15:12] == OP_RECONFIG);
    fields.on   = instr[8];
    fields.s    = instr[7:6];
    fields.p[0] = instr[5];
    fields.p[1] = instr[4];
    fields.p[2] = instr[3];
    fields.p[3] = instr[2];
    fields.v    = vl_e'(instr[1:0]);
    en = '0;
    if (fields.on) en[fields.v] = 1'b1;
  end
endmodule
