// tb_rq_workloads: the worked configuration of the instruction format on
// the full system at default parameters: processors 0, 1 and 3 form the TMR
// group and processor 3 fetches (S1 S0 = 11, P0..P3 = 1101). Processor 3
// runs one voted instruction with each of VL0, VL1 and VL2 while one
// execute unit of the group is faulty, so the voter inputs come from
// processors 0, 1 and 3 through the compaction multiplexers. Processor 2,
// not selected, keeps running and its own RECONFIG ON waits until the group
// is dissolved. Every result is checked, and so is the diagnosis, which
// must name the faulty processor by its own number.
module tb_rq_workloads;
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
  int n_indep = 0, n_stall = 0;
  logic [3:0] seen_mod [4];
  logic       seen_active [4];

  rq_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // processor 1's execute unit is faulty while the group is on;
  // for the sub-word voter only in ignored bits, for the median voter by a
  // large amount
  always_comb begin
    for (int i = 0; i < NCORE; i++) fault_inj[i] = '0;
    if (cfg.on && dut.g_core[1].u_core.ex.valid) begin
      unique case (cfg.v)
        VL_CDWV:   fault_inj[1] = 32'h0000_0400;
        VL_SUBW:   fault_inj[1] = 32'h8000_0000;
        VL_MEDIAN: fault_inj[1] = 32'h0010_0000;
        default:   ;
      endcase
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (vdiag.active) begin
      seen_active[vdiag.vl] = 1'b1;
      seen_mod[vdiag.vl] |= vdiag.err_mod;
    end
    if (cfg.on && dut.rd_out[2].valid) n_indep++;
    if (cfg.on && dut.req[2] && !dut.grant[2]) n_stall++;
  end

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
  localparam logic [3:0]  P013 = 4'b1011;  // p[0], p[1], p[3] set: "1101" as P0 P1 P2 P3

  logic [15:0] prog [4][$];

  task automatic load(int c);
    for (int i = 0; i < prog[c].size(); i++) begin
      @(negedge clk);
      imem_we = 1; imem_core = 2'(c); imem_addr = 8'(i); imem_wdata = prog[c][i];
    end
    @(negedge clk);
    imem_we = 0;
  endtask

  task automatic chk(int c, int r, logic [31:0] v);
    dbg_core = 2'(c); dbg_raddr = 4'(r);
    #1;
    checks++;
    if (dbg_rdata !== v) begin
      failures++;
      $display("FAIL P%0d r%0d = %h, expected %h", c, r, dbg_rdata, v);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin seen_mod[i] = '0; seen_active[i] = 1'b0; end
    prog[0] = {ri(OP_LI, 1, 1), HALT};
    prog[1] = {ri(OP_LI, 1, 2), HALT};
    prog[2] = {ri(OP_LI, 1, 5), ri(OP_LI, 2, 6), ri(OP_LI, 3, 7), ri(OP_LI, 4, 8), ri(OP_LI, 5, 9),
               ri(OP_LI, 6, 10), ri(OP_LI, 7, 11), ri(OP_LI, 8, 12), ri(OP_LI, 9, 13),
               rc(1, 2, 4'b0111, VL_CDWV), rr(OP_ADD, 10, 1, 2), rc(0, 0, 4'b0000, VL_CDWV), HALT};
    prog[3] = {ri(OP_LI, 1, 100), ri(OP_LI, 2, 23),
               rc(1, 3, P013, VL_CDWV),   rr(OP_ADD, 3, 1, 2),   // 123
               rc(1, 3, P013, VL_SUBW),   rr(OP_SUB, 4, 1, 2),   // 77
               rc(1, 3, P013, VL_MEDIAN), rr(OP_XOR, 5, 1, 2),   // 100 ^ 23
               rc(0, 0, 4'b0000, VL_CDWV), HALT};
    for (int c = 0; c < 4; c++) load(c);
    rst_n = 1;
    @(negedge clk);
    mask_we = 1; mask_wdata = 32'hF000_0000;
    delta_we = 1; delta_wdata = 32'd16;
    @(negedge clk);
    mask_we = 0; delta_we = 0;
    wait (halted == 4'b1111);
    repeat (3) @(negedge clk);
    chk(3, 3, 32'd123);
    chk(3, 4, 32'd77);
    chk(3, 5, 32'd100 ^ 32'd23);
    chk(0, 1, 32'd1); chk(1, 1, 32'd2);
    chk(0, 3, 32'd0); chk(1, 3, 32'd0);   // group members other than 3 are not written
    chk(2, 9, 32'd13);
    chk(2, 10, 32'd11);                  // processor 2's own TMR after the group ended
    for (int v = 0; v < 3; v++) begin
      checks++;
      if (!seen_active[v] || seen_mod[v] !== (v == 1 ? 4'b0000 : 4'b0010)) begin
        failures++;
        $display("FAIL VL%0d diagnosis %b", v, seen_mod[v]);
      end
    end
    checks++;
    if (n_indep == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL processor 2 independent=%0d stalled=%0d", n_indep, n_stall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
