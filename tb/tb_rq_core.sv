// tb_rq_core: one processor on its own. The Read output is looped straight
// into Execute and the Execute result straight back as the write-back (the
// MIMD path of the interconnect); RECONFIG requests are granted after a few
// cycles. Runs a straight-line program of every instruction, checks the
// register file against values worked out here, the issue rate (independent
// instructions one per cycle, a dependent one three cycles after its
// producer), that freeze stops issue, that a RECONFIG waits for its grant,
// that fault_inj corrupts a result, the executed-instruction count and halt.
module tb_rq_core;
  import rq_pkg::*;
  logic            clk = 0, rst_n = 0;
  logic            imem_we = 0;
  logic [7:0]      imem_addr = '0;
  logic [15:0]     imem_wdata = '0;
  issue_t          rd_out, ex_in;
  exres_t          ex_res, wb_in;
  logic            freeze = 0, rc_req, rc_grant, busy, be_busy, halted;
  rcfg_t           rc_fields;
  logic [31:0]     fault_inj = '0, exec_count, dbg_rdata;
  logic [3:0]      dbg_raddr = '0;
  int checks = 0, failures = 0;
  int cyc = 0;
  int issue_cyc [$];
  int rc_wait = 0, frozen_issue = 0, frozen_cycles = 0;

  rq_core dut (.*);

  assign ex_in = rd_out;
  assign wb_in = ex_res;

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (rd_out.valid) issue_cyc.push_back(cyc);
    if (freeze) begin frozen_cycles++; if (rd_out.valid) frozen_issue++; end
    if (rc_req && !rc_grant) rc_wait++;
  end
  // grant a RECONFIG after it has waited three cycles
  always_ff @(posedge clk) begin
    if (!rc_req)                 rc_grant <= 1'b0;
    else if (rc_wait % 4 == 3)   rc_grant <= 1'b1;
    else                         rc_grant <= 1'b0;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] rr(opcode_e op, int rd, int rs1, int rs2);
    return {op, 4'(rd), 4'(rs1), 4'(rs2)};
  endfunction
  function automatic logic [15:0] ri(opcode_e op, int rd, int imm);
    return {op, 4'(rd), 8'(imm)};
  endfunction

  logic [15:0] prog [$];

  task automatic chk(int r, logic [31:0] v);
    dbg_raddr = 4'(r);
    #1;
    checks++;
    if (dbg_rdata !== v) begin failures++; $display("FAIL r%0d = %h, expected %h", r, dbg_rdata, v); end
  endtask

  initial begin
    rcfg_t f;
    f = '0; f.on = 1'b1; f.p = 4'b0111; f.v = VL_MEDIAN;
    prog = {ri(OP_LI, 1, 5), ri(OP_LI, 2, -7), rr(OP_ADD, 3, 1, 2),          // 0..2
            ri(OP_LI, 5, 1), ri(OP_LI, 6, 2), ri(OP_LI, 7, 3), ri(OP_LI, 8, 4), // 3..6 independent
            rr(OP_SUB, 4, 1, 2), rr(OP_XOR, 9, 1, 2), rr(OP_AND, 10, 1, 2),
            rr(OP_OR, 11, 1, 2), rr(OP_SHL, 12, 1, 6), ri(OP_ADDI, 1, -3),
            enc_reconfig(f), ri(OP_LI, 13, 100), 16'h0000, ri(OP_LI, 14, 77),
            ri(OP_LI, 15, 9), 16'hF000, ri(OP_LI, 15, 1)};
    @(negedge clk);
    for (int i = 0; i < prog.size(); i++) begin
      imem_we = 1; imem_addr = 8'(i); imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 0;
    rst_n = 1;
    // freeze for a while once the program has started
    repeat (12) @(negedge clk);
    freeze = 1;
    repeat (5) @(negedge clk);
    freeze = 0;
    // corrupt the write of LI r14
    wait (dut.ex.valid && dut.ex.rd == 4'd14);
    @(negedge clk);
    fault_inj = 32'h0000_0100;
    @(negedge clk);
    fault_inj = '0;
    wait (halted);
    repeat (2) @(negedge clk);
    chk(1, 32'd2);
    chk(2, 32'hFFFF_FFF9);
    chk(3, 32'hFFFF_FFFE);
    chk(4, 32'd12);
    chk(5, 32'd1); chk(6, 32'd2); chk(7, 32'd3); chk(8, 32'd4);
    chk(9, 32'd5 ^ 32'hFFFF_FFF9);
    chk(10, 32'd5 & 32'hFFFF_FFF9);
    chk(11, 32'd5 | 32'hFFFF_FFF9);
    chk(12, 32'd20);
    chk(13, 32'd100);
    chk(14, 32'd77 ^ 32'h100);
    chk(15, 32'd9);
    // 17 instructions reach Execute (RECONFIG and HALT do not)
    checks++;
    if (exec_count !== 32'd17) begin failures++; $display("FAIL exec_count %0d", exec_count); end
    // issue timing: LI r2 -> ADD r3 four cycles; LI r5..r8 back to back
    checks++;
    if (issue_cyc[2] - issue_cyc[1] != 4) begin failures++; $display("FAIL dependent issue gap %0d", issue_cyc[2] - issue_cyc[1]); end
    checks++;
    if (issue_cyc[6] - issue_cyc[3] != 3) begin failures++; $display("FAIL independent issue span %0d", issue_cyc[6] - issue_cyc[3]); end
    checks++;
    if (frozen_issue != 0 || frozen_cycles != 5) begin failures++; $display("FAIL issued while frozen"); end
    checks++;
    if (rc_wait < 3) begin failures++; $display("FAIL RECONFIG did not wait for its grant (%0d)", rc_wait); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
