// tb_rq_top: end-to-end run of the four-processor system at its default
// parameters. Four programs run together:
//  * processor 0 builds TMR on processors 0,1,2 (VL0), re-targets it to the
//    sub-word voter (VL1) and the median voter (VL2), then turns it off;
//  * processors 1 and 2 run their own programs and are frozen while they
//    lend their execute units;
//  * processor 3 works on its own meanwhile, then fetches a RECONFIG ON for
//    4MR with the 3-of-4 voter, which stalls until processor 0's TMR ends.
// Faults are injected into chosen execute units while voted instructions
// run (keyed by destination register). The testbench checks every register
// of every processor against values worked out here, the voters' diagnosis,
// and counts each mechanism (switches, freezes, drain waits, the fourth
// processor's stall, masked faults, voter error, each voter in use,
// independent work during TMR, data-hazard stalls); a mechanism that never
// happened counts as a failure.
module tb_rq_top;
  import rq_pkg::*;
  logic            clk = 0, rst_n = 0;
  logic            imem_we = 0;
  logic [1:0]      imem_core = '0;
  logic [7:0]      imem_addr = '0;
  logic [15:0]     imem_wdata = '0;
  logic            mask_we = 0, delta_we = 0;
  logic [31:0]     mask_wdata = '0, delta_wdata = '0;
  logic [31:0]     fault_inj [NCORE];
  logic [3:0]      halted, freeze;
  logic [31:0]     exec_count [NCORE];
  rcfg_t           cfg;
  logic            rc_pending;
  vdiag_t          vdiag;
  logic [1:0]      dbg_core = '0;
  logic [3:0]      dbg_raddr = '0;
  logic [31:0]     dbg_rdata;
  logic [31:0]     ewv_in1 = '0, ewv_in2 = '0, ewv_in3 = '0, ewv_z, ewv_z_n;
  logic            ewv_error, ewv_error_n, ewv_rail_fault;

  int checks = 0, failures = 0;

  rq_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- fault injection ----------------
  function automatic logic [3:0] ex_rd(int i);
    unique case (i)
      0: return dut.g_core[0].u_core.ex.rd;
      1: return dut.g_core[1].u_core.ex.rd;
      2: return dut.g_core[2].u_core.ex.rd;
      default: return dut.g_core[3].u_core.ex.rd;
    endcase
  endfunction

  always_comb begin
    for (int i = 0; i < NCORE; i++) fault_inj[i] = '0;
    if (cfg.on && cfg.v == VL_CDWV) begin
      if (ex_rd(1) == 4'd3) fault_inj[1] = 32'h0000_0010;   // single fault: masked
      if (ex_rd(1) == 4'd9) fault_inj[1] = 32'h0000_0001;   // two faults: no majority
      if (ex_rd(2) == 4'd9) fault_inj[2] = 32'h0000_0002;
    end
    if (cfg.on && cfg.v == VL_SUBW && ex_rd(2) == 4'd5) fault_inj[2] = 32'h0100_0000; // ignored bits
    if (cfg.on && cfg.v == VL_MEDIAN && ex_rd(1) == 4'd8) fault_inj[1] = 32'h0000_0001;  // within range
    if (cfg.on && cfg.v == VL_MEDIAN && ex_rd(2) == 4'd8) fault_inj[2] = 32'h0000_0100;  // out of range
    if (cfg.on && cfg.v == VL_3OF4 && ex_rd(2) == 4'd10) fault_inj[2] = 32'h8000_0000;
  end

  // ---------------- mechanism counters ----------------
  int n_on = 0, n_off = 0, n_freeze = 0, n_drain = 0, n_stall4 = 0, n_masked = 0;
  int n_verr = 0, n_indep = 0, n_hazard = 0;
  int n_vl [4];
  logic [3:0] diag_mod_seen [4];
  logic [3:0] grant_q;

  always @(posedge clk) if (rst_n) begin
    if (dut.grant != 0 && dut.u_ctrl.nxt.on)               n_on++;
    if (dut.grant != 0 && cfg.on && !dut.u_ctrl.nxt.on)    n_off++;
    if (freeze != 0)                                       n_freeze++;
    if (rc_pending)                                        n_drain++;
    if (cfg.on && dut.req[3] && !dut.grant[3] && !cfg.p[3]) n_stall4++;
    if (vdiag.active) begin
      n_vl[vdiag.vl]++;
      diag_mod_seen[vdiag.vl] |= vdiag.err_mod;
      if (vdiag.err_mod != 0 && !vdiag.error) n_masked++;
      if (vdiag.error) n_verr++;
    end
    if (cfg.on && !cfg.p[3] && dut.rd_out[3].valid)        n_indep++;
    if (dut.g_core[0].u_core.hazard && dut.g_core[0].u_core.dr.valid) n_hazard++;
    if (dut.g_core[1].u_core.hazard && dut.g_core[1].u_core.dr.valid) n_hazard++;
    if (dut.g_core[2].u_core.hazard && dut.g_core[2].u_core.dr.valid) n_hazard++;
    if (dut.g_core[3].u_core.hazard && dut.g_core[3].u_core.dr.valid) n_hazard++;
  end

  // ---------------- programs ----------------
  function automatic logic [15:0] rr(opcode_e op, int rd, int rs1, int rs2);
    return {op, 4'(rd), 4'(rs1), 4'(rs2)};
  endfunction
  function automatic logic [15:0] ri(opcode_e op, int rd, int imm);
    return {op, 4'(rd), 8'(imm)};
  endfunction
  function automatic logic [15:0] rc(logic on, int s, logic [3:0] p, vl_e v);
    rcfg_t f;
    f.on = on; f.s = 2'(s); f.p = p; f.v = v;
    return enc_reconfig(f);
  endfunction
  localparam logic [15:0] HALT = 16'hF000;

  logic [15:0] prog [4][$];

  task automatic load(int c);
    for (int i = 0; i < prog[c].size(); i++) begin
      @(negedge clk);
      imem_we = 1; imem_core = 2'(c); imem_addr = 8'(i); imem_wdata = prog[c][i];
    end
    @(negedge clk);
    imem_we = 0;
  endtask

  task automatic chk(int c, int r, logic [31:0] v, string what);
    dbg_core = 2'(c); dbg_raddr = 4'(r);
    #1;
    checks++;
    if (dbg_rdata !== v) begin
      failures++;
      $display("FAIL P%0d r%0d = %h, expected %h (%s)", c, r, dbg_rdata, v, what);
    end
  endtask

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-40s %0d", what, n);
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin n_vl[i] = 0; diag_mod_seen[i] = '0; end
    prog[0] = {ri(OP_LI, 1, 10), ri(OP_LI, 2, 20),
               rc(1, 0, 4'b0111, VL_CDWV),
               rr(OP_ADD, 3, 1, 2),           // 30, one faulty module
               ri(OP_LI, 9, 55),              // two faulty modules: not written
               rc(1, 0, 4'b0111, VL_SUBW),
               rr(OP_ADD, 5, 1, 2),           // 30, fault in ignored bits
               ri(OP_LI, 7, -1),              // 0x00FF_FFFF
               rc(1, 0, 4'b0111, VL_MEDIAN),
               rr(OP_ADD, 8, 1, 2),           // 30 / 31 / 286 -> median 31
               rc(0, 0, 4'b0000, VL_CDWV),    // RECONFIG OFF
               ri(OP_LI, 11, 1), rr(OP_ADD, 12, 11, 3), HALT};
    prog[1] = {ri(OP_LI, 1, 11), ri(OP_LI, 2, 22), rr(OP_ADD, 3, 1, 2), rr(OP_SHL, 4, 3, 1),
               rr(OP_XOR, 5, 4, 2), ri(OP_ADDI, 5, 3), rr(OP_OR, 6, 5, 1), rr(OP_SUB, 7, 6, 3),
               ri(OP_LI, 8, -100), rr(OP_AND, 9, 8, 7), HALT};
    prog[2] = {ri(OP_LI, 4, 40), ri(OP_LI, 5, 50), rr(OP_SUB, 6, 5, 4), rr(OP_SHL, 7, 6, 6),
               ri(OP_ADDI, 7, -24), rr(OP_ADD, 8, 7, 7), ri(OP_LI, 1, 7), rr(OP_XOR, 2, 1, 8), HALT};
    prog[3] = {ri(OP_LI, 1, 3), ri(OP_LI, 2, 4), rr(OP_ADD, 3, 1, 2), rr(OP_ADD, 4, 3, 3),
               rr(OP_SUB, 5, 4, 1), rr(OP_SHL, 6, 5, 2),
               rc(1, 3, 4'b1111, VL_3OF4),
               rr(OP_ADD, 10, 1, 1),          // 6 under 4MR, core 2 faulty
               rc(0, 0, 4'b0000, VL_CDWV),
               ri(OP_LI, 11, 5), HALT};
    for (int c = 0; c < 4; c++) load(c);
    // sub-word mask (ignore the top byte) and median range, loaded while
    // the processors start
    rst_n = 1;
    @(negedge clk);
    mask_we = 1; mask_wdata = 32'hFF00_0000;
    delta_we = 1; delta_wdata = 32'd4;
    @(negedge clk);
    mask_we = 0; delta_we = 0;

    wait (halted == 4'b1111);
    repeat (3) @(negedge clk);

    // processor 0: voted results
    chk(0, 1, 32'd10, "MIMD");
    chk(0, 2, 32'd20, "MIMD");
    chk(0, 3, 32'd30, "VL0 masks a single fault");
    chk(0, 9, 32'd0, "VL0 error suppresses the write");
    chk(0, 5, 32'd30, "VL1 ignores masked bits");
    chk(0, 7, 32'h00FF_FFFF, "VL1 output has masked bits 0");
    chk(0, 8, 32'd31, "VL2 median within range");
    chk(0, 11, 32'd1, "after RECONFIG OFF");
    chk(0, 12, 32'd31, "after RECONFIG OFF");
    // processors 1 and 2: own programs, unaffected by lending execute units
    chk(1, 1, 32'd11, ""); chk(1, 2, 32'd22, ""); chk(1, 3, 32'd33, "");
    chk(1, 4, 32'd33 << 11, ""); chk(1, 5, ((32'd33 << 11) ^ 32'd22) + 3, "");
    chk(1, 6, (((32'd33 << 11) ^ 32'd22) + 3) | 32'd11, "");
    chk(1, 7, ((((32'd33 << 11) ^ 32'd22) + 3) | 32'd11) - 32'd33, "");
    chk(1, 8, 32'hFFFF_FF9C, "");
    chk(1, 9, 32'hFFFF_FF9C & (((((32'd33 << 11) ^ 32'd22) + 3) | 32'd11) - 32'd33), "");
    chk(1, 10, 32'd0, "selected, non-fetching: never written by 4MR");
    chk(2, 4, 32'd40, ""); chk(2, 5, 32'd50, ""); chk(2, 6, 32'd10, "");
    chk(2, 7, (32'd10 << 10) - 24, ""); chk(2, 8, 2 * ((32'd10 << 10) - 24), "");
    chk(2, 1, 32'd7, ""); chk(2, 2, 32'd7 ^ (2 * ((32'd10 << 10) - 24)), "");
    chk(2, 3, 32'd0, "selected, non-fetching: never written by TMR");
    // processor 3
    chk(3, 3, 32'd7, ""); chk(3, 4, 32'd14, ""); chk(3, 5, 32'd11, ""); chk(3, 6, 32'd11 << 4, "");
    chk(3, 10, 32'd6, "VL3 masks a single fault");
    chk(3, 11, 32'd5, "");
    // diagnosis
    checks++;
    if (diag_mod_seen[0] !== 4'b0010 || diag_mod_seen[1] !== 4'b0000 ||
        diag_mod_seen[2] !== 4'b0100 || diag_mod_seen[3] !== 4'b0100) begin
      failures++;
      $display("FAIL diagnosis seen %b %b %b %b", diag_mod_seen[0], diag_mod_seen[1], diag_mod_seen[2], diag_mod_seen[3]);
    end
    // executed instructions: processor 1 and 2 count their own plus lent ones
    checks++;
    if (exec_count[0] != 32'd10) begin failures++; $display("FAIL exec_count[0] = %0d", exec_count[0]); end
    checks++;
    if (exec_count[1] != 32'd10 + 5 + 1 || exec_count[2] != 32'd8 + 5 + 1) begin
      failures++; $display("FAIL exec_count[1..2] = %0d %0d", exec_count[1], exec_count[2]);
    end
    // stand-alone exact word voter
    ewv_in1 = 32'hDEAD_BEEF; ewv_in2 = 32'hDEAD_BEEF; ewv_in3 = 32'h0BAD_F00D;
    #1 checks++;
    if (ewv_z !== 32'hDEAD_BEEF || ewv_z_n !== ~32'hDEAD_BEEF || ewv_error || !ewv_error_n || ewv_rail_fault) failures++;

    $display("mechanisms:");
    need(n_on, "RECONFIG ON");
    need(n_off, "RECONFIG OFF");
    need(n_freeze, "cycles with a frozen front end");
    need(n_drain, "cycles waiting for pipelines to drain");
    need(n_stall4, "cycles the 4th processor's RECONFIG stalled");
    need(n_indep, "instructions issued by the 4th processor in TMR");
    need(n_vl[0], "VL0 votes");
    need(n_vl[1], "VL1 votes");
    need(n_vl[2], "VL2 votes");
    need(n_vl[3], "VL3 votes");
    need(n_masked, "faults masked and diagnosed");
    need(n_verr, "voter errors");
    need(n_hazard, "data-hazard stall cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
