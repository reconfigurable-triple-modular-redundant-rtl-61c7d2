// rq_core: one processor of the reconfigurable four-processor system.
//
// An in-order pipeline Fetch, Decode, Read, Execute, Reconfigure, Write with
// a private instruction memory and a 16 x 32-bit register file. The stages
// that the redundancy interconnect sits between are brought out:
//  * rd_out is the Read-stage output (operands read, valid when it issues);
//    the Execute stage takes ex_in, chosen outside between this processor's
//    own rd_out and the fetching processor's (TMR/4MR mode);
//  * ex_res is the Execute result register feeding the Reconfigure stage;
//  * wb_in comes back from the Reconfigure stage (own or voted result, with
//    the write enable) and is registered into the Write stage.
// Decode holds a RECONFIG (rc_req, rc_fields) until rc_grant; HALT stops
// fetching. freeze stops Fetch, Decode and Read. Read waits while an older
// instruction in Execute, Reconfigure or Write targets a source register (no
// forwarding). Back end stages never stall. exec_count counts instructions
// executed by this processor's Execute stage, its own or broadcast ones (the
// aging metric for choosing processors). fault_inj is XORed into the Execute
// result of writing instructions to model a faulty execute unit.
// The instruction set (see rq_pkg) is a minimal stand-in of this design's
// own; one instruction per cycle without dependences, a dependent
// instruction issues three cycles after its producer. Reset: asynchronous,
// active low, clears PC, pipeline and registers.
module rq_core
  import rq_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  localparam int unsigned AW = $clog2(IMEM_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  // program load
  input  logic            imem_we,
  input  logic [AW-1:0]   imem_addr,
  input  logic [ILEN-1:0] imem_wdata,
  // redundancy interconnect
  output issue_t          rd_out,
  input  issue_t          ex_in,
  output exres_t          ex_res,
  input  exres_t          wb_in,
  // reconfiguration control
  input  logic            freeze,
  output logic            rc_req,
  output rcfg_t           rc_fields,
  input  logic            rc_grant,
  output logic            busy,
  output logic            be_busy,
  // test and status
  input  logic [XLEN-1:0] fault_inj,
  output logic            halted,
  output logic [31:0]     exec_count,
  input  logic [3:0]      dbg_raddr,
  output logic [XLEN-1:0] dbg_rdata
);
  typedef struct packed {
    logic            valid;
    logic [ILEN-1:0] instr;
  } fd_t;

  typedef struct packed {
    logic            valid;
    opcode_e         op;
    logic [3:0]      rd;
    logic [3:0]      rs1;
    logic [3:0]      rs2;
    logic            use1;
    logic            use2;
    logic            we;
    logic [XLEN-1:0] imm;
  } dr_t;

  logic [ILEN-1:0] imem [IMEM_DEPTH];
  logic [XLEN-1:0] rf   [NREG];

  logic [AW-1:0] pc;
  logic          halt_seen;
  fd_t           fd;
  dr_t           dr, dec;
  issue_t        ex;
  exres_t        wbr;

  logic is_rc;
  logic [3:0] rc_en_unused;
  logic hazard, fire, r_stall, d_take, d_hold, f_take;
  logic [XLEN-1:0] alu;

  // ---------------- Fetch ----------------
  always_ff @(posedge clk) begin
    if (imem_we) imem[imem_addr] <= imem_wdata;
  end

  // ---------------- Decode ----------------
  reconfig_decoder u_dec (
    .instr(fd.instr), .is_reconfig(is_rc), .fields(rc_fields), .en(rc_en_unused)
  );

  always_comb begin
    dec       = '0;
    dec.valid = fd.valid;
    dec.op    = opcode_e'(fd.instr[15:12]);
    dec.rd    = fd.instr[11:8];
    dec.rs1   = fd.instr[7:4];
    dec.rs2   = fd.instr[3:0];
    dec.imm   = XLEN'(signed'(fd.instr[7:0]));
    unique case (dec.op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHL: begin
        dec.use1 = 1'b1; dec.use2 = 1'b1; dec.we = 1'b1;
      end
      OP_LI:   dec.we = 1'b1;
      OP_ADDI: begin dec.rs1 = fd.instr[11:8]; dec.use1 = 1'b1; dec.we = 1'b1; end
      default: ;  // NOP, RECONFIG, HALT and unused codes write nothing
    endcase
    rc_req = fd.valid & is_rc;
  end

  // ---------------- Read ----------------
  always_comb begin
    hazard = 1'b0;
    if (dr.use1 && ((ex.valid && ex.we && ex.rd == dr.rs1) ||
                    (ex_res.valid && ex_res.we && ex_res.rd == dr.rs1) ||
                    (wbr.valid && wbr.we && wbr.rd == dr.rs1))) hazard = 1'b1;
    if (dr.use2 && ((ex.valid && ex.we && ex.rd == dr.rs2) ||
                    (ex_res.valid && ex_res.we && ex_res.rd == dr.rs2) ||
                    (wbr.valid && wbr.we && wbr.rd == dr.rs2))) hazard = 1'b1;
    fire    = dr.valid & ~hazard & ~freeze;
    r_stall = dr.valid & ~fire;

    rd_out.valid = fire;
    rd_out.op    = dr.op;
    rd_out.rd    = dr.rd;
    rd_out.we    = dr.we;
    rd_out.a     = (dr.op == OP_LI) ? dr.imm : rf[dr.rs1];
    rd_out.b     = (dr.op == OP_ADDI) ? dr.imm : rf[dr.rs2];

    // Decode hands its instruction on when Read is free and it is not a
    // RECONFIG (which leaves on its grant) and not a HALT (which stops here)
    d_hold = fd.valid & ((is_rc & ~rc_grant) | (~is_rc & (r_stall | freeze)));
    d_take = ~d_hold;                   // Decode register may load
    f_take = d_take & ~halt_seen & ~freeze
           & ~(fd.valid & (dec.op == OP_HALT));
  end

  // ---------------- front-end registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc        <= '0;
      halt_seen <= 1'b0;
      fd        <= '0;
      dr        <= '0;
    end else begin
      // Read stage register
      if (fire || !dr.valid) begin
        if (fd.valid && !is_rc && dec.op != OP_HALT && !freeze) dr <= dec;
        else                                                     dr <= '0;
      end
      // Decode stage register
      if (d_take && fd.valid && !is_rc && dec.op == OP_HALT) halt_seen <= 1'b1;
      if (d_take) begin
        if (f_take) begin
          fd.valid <= 1'b1;
          fd.instr <= imem[pc];
          pc       <= pc + 1'b1;
        end else begin
          fd <= '0;
        end
      end
    end
  end

  // ---------------- Execute ----------------
  always_comb begin
    unique case (ex.op)
      OP_ADD:  alu = ex.a + ex.b;
      OP_SUB:  alu = ex.a - ex.b;
      OP_AND:  alu = ex.a & ex.b;
      OP_OR:   alu = ex.a | ex.b;
      OP_XOR:  alu = ex.a ^ ex.b;
      OP_SHL:  alu = ex.a << ex.b[4:0];
      OP_LI:   alu = ex.a;
      OP_ADDI: alu = ex.a + ex.b;
      default: alu = '0;
    endcase
  end

  // ---------------- back-end registers and register file ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex         <= '0;
      ex_res     <= '0;
      wbr        <= '0;
      exec_count <= '0;
      for (int i = 0; i < NREG; i++) rf[i] <= '0;
    end else begin
      ex            <= ex_in;
      ex_res.valid  <= ex.valid;
      ex_res.rd     <= ex.rd;
      ex_res.we     <= ex.we;
      ex_res.data   <= ex.we ? (alu ^ fault_inj) : alu;
      wbr           <= wb_in;
      if (ex.valid) exec_count <= exec_count + 1;
      if (wbr.valid && wbr.we) rf[wbr.rd] <= wbr.data;
    end
  end

  always_comb begin
    busy      = dr.valid | ex.valid | ex_res.valid | wbr.valid;
    be_busy   = ex.valid | ex_res.valid | wbr.valid;
    halted    = halt_seen & ~fd.valid & ~busy;
    dbg_rdata = rf[dbg_raddr];
  end
endmodule
