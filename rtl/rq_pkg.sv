// rq_pkg: types and constants shared by the reconfigurable four-processor
// TMR/4MR system.
//
// The RECONFIG instruction fields (ON, S1 S0, P0..P3, V1 V0) follow the
// field list and order of the instruction format; their bit positions, the
// 16-bit instruction word and the small stand-in instruction set (the real
// processors' instruction set is not part of this design) are this design's
// own choices.
package rq_pkg;

  localparam int unsigned XLEN  = 32;  // processor data width
  localparam int unsigned ILEN  = 16;  // instruction width
  localparam int unsigned NCORE = 4;   // processors
  localparam int unsigned NREG  = 16;  // registers per processor

  // Instruction word: op[15:12] rd[11:8] rs1[7:4] rs2[3:0], or op rd imm8[7:0]
  typedef enum logic [3:0] {
    OP_NOP      = 4'h0,
    OP_ADD      = 4'h1,  // rd = rs1 + rs2
    OP_SUB      = 4'h2,  // rd = rs1 - rs2
    OP_AND      = 4'h3,
    OP_OR       = 4'h4,
    OP_XOR      = 4'h5,
    OP_SHL      = 4'h6,  // rd = rs1 << rs2[4:0]
    OP_LI       = 4'h7,  // rd = sign-extended imm8
    OP_ADDI     = 4'h8,  // rd = rd + sign-extended imm8
    OP_RECONFIG = 4'hE,  // reliability zone in bits 8:0
    OP_HALT     = 4'hF
  } opcode_e;

  // Voting logic selected by V1 V0
  typedef enum logic [1:0] {
    VL_CDWV   = 2'd0,  // centralized diagnosable word voter
    VL_SUBW   = 2'd1,  // centralized diagnosable sub-word voter
    VL_MEDIAN = 2'd2,  // median diagnosable word voter
    VL_3OF4   = 2'd3   // 3-of-4 centralized diagnosable word voter
  } vl_e;

  // RECONFIG fields. p[0] is P0 (processor 0 selected) ... p[3] is P3.
  typedef struct packed {
    logic       on;
    logic [1:0] s;   // S1 S0: processor that fetches while ON
    logic [3:0] p;   // selected processors
    vl_e        v;   // V1 V0
  } rcfg_t;

  // Read-stage output / Execute-stage input
  typedef struct packed {
    logic            valid;
    opcode_e         op;
    logic [3:0]      rd;
    logic            we;
    logic [XLEN-1:0] a;
    logic [XLEN-1:0] b;
  } issue_t;

  // Execute-stage result / write-back bundle
  typedef struct packed {
    logic            valid;
    logic [3:0]      rd;
    logic            we;
    logic [XLEN-1:0] data;
  } exres_t;

  // Diagnosis reported by the enabled voting logic
  typedef struct packed {
    logic       active;     // a voted instruction is in the Reconfigure stage
    vl_e        vl;
    logic       error;      // voter could not form an output
    logic       match_err;  // inconsistent match pattern
    logic [3:0] err_mod;    // module found faulty, numbered by processor
  } vdiag_t;

  // RECONFIG encoding helper
  function automatic logic [ILEN-1:0] enc_reconfig(rcfg_t f);
    return {OP_RECONFIG, 3'b000, f.on, f.s, f.p[0], f.p[1], f.p[2], f.p[3], f.v};
  endfunction

endpackage
