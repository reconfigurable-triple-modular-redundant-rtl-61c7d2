// tb_reconfig_stage: random configurations of the Reconfigure stage. For
// each case the selected processors carry the same word, possibly with one
// or two of them corrupted; the testbench picks the voter inputs itself
// (selected processors in order), works out the voted word, the faulty
// processor and the write enables (fetching or unselected processors only,
// none when the voter fails) and compares every write-back bundle.
module tb_reconfig_stage;
  import rq_pkg::*;
  logic        clk = 0, rst_n = 0;
  exres_t      ex_res [NCORE];
  exres_t      wb     [NCORE];
  logic [1:0]  sel_s;
  logic [3:0]  sel_p, en;
  logic        mask_we = 0;
  logic [31:0] mask_wdata = '0, delta = '0;
  vdiag_t      vdiag;
  int checks = 0, failures = 0;
  int seen [4];

  reconfig_stage dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] good, voted, mask;
    int          sel [$];
    int          nbad, bad0, bad1, v, b0, b1;
    logic        exp_err;
    logic [3:0]  exp_mod;
    mask = 32'hFF00_0000;
    for (int i = 0; i < 4; i++) seen[i] = 0;
    ex_res[0] = '0; ex_res[1] = '0; ex_res[2] = '0; ex_res[3] = '0;
    sel_s = 0; sel_p = 0; en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    mask_wdata = mask; mask_we = 1;
    @(negedge clk);
    mask_we = 0;
    for (int k = 0; k < 800; k++) begin
      v = k % 4;
      en = 4'b0001 << v;
      if (v == 3) sel_p = 4'b1111;
      else begin
        sel_p = 4'b1111;
        sel_p[$urandom % 4] = 1'b0;
      end
      sel = {};
      for (int i = 0; i < 4; i++) if (sel_p[i]) sel.push_back(i);
      sel_s = 2'(sel[$urandom % sel.size()]);
      good  = $urandom;
      for (int i = 0; i < 4; i++) begin
        ex_res[i].valid = 1'b1;
        ex_res[i].rd    = 4'($urandom);
        ex_res[i].we    = 1'b1;
        ex_res[i].data  = sel_p[i] ? good : $urandom;
      end
      nbad = (k / 4) % 3;           // 0, 1 or 2 corrupted selected processors
      b0   = $urandom % sel.size();
      b1   = (b0 + 1 + $urandom % (sel.size() - 1)) % sel.size();
      bad0 = sel[b0];
      bad1 = sel[b1];
      if (nbad >= 1) ex_res[bad0].data = (v == 1) ? good ^ (mask & (32'h1 << (24 + $urandom % 8))) : good ^ 32'h0001_0000;
      if (nbad == 2) ex_res[bad1].data = good ^ 32'h0000_0100;
      // expected voter result
      exp_err = 1'b0; exp_mod = '0;
      voted   = (v == 1) ? (good & ~mask) : good;
      if (v == 1) begin
        // bad0 differs only in ignored bits: only bad1 counts
        if (nbad == 2) exp_mod[bad1] = 1'b1;
      end else if (v == 3) begin
        exp_err = (nbad == 2);
        if (nbad == 1) exp_mod[bad0] = 1'b1;
      end else begin
        exp_err = (nbad == 2);
        if (nbad == 1) exp_mod[bad0] = 1'b1;
      end
      if (v == 2 && nbad == 2) begin
        // three different words, delta 0: the two that are not the median
        logic [31:0] a, b, c, med;
        a = ex_res[sel[0]].data; b = ex_res[sel[1]].data; c = ex_res[sel[2]].data;
        if ((a >= b && a <= c) || (a <= b && a >= c)) med = a;
        else if ((b >= a && b <= c) || (b <= a && b >= c)) med = b;
        else med = c;
        exp_err = 1'b1;
        for (int j = 0; j < 3; j++) exp_mod[sel[j]] = (ex_res[sel[j]].data != med);
      end
      #1;
      checks++;
      if (vdiag.error !== exp_err || vdiag.err_mod !== exp_mod || !vdiag.active || vdiag.vl !== vl_e'(v)) begin
        failures++;
        $display("FAIL diag vl=%0d p=%b nbad=%0d bad0=%0d: error=%b err_mod=%b exp %b/%b", v, sel_p, nbad, bad0, vdiag.error, vdiag.err_mod, exp_err, exp_mod);
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (wb[i].valid !== 1'b1 || wb[i].rd !== ex_res[i].rd ||
            wb[i].we !== ((sel_s == 2'(i) || !sel_p[i]) && !(sel_p[i] && exp_err)) ||
            (!exp_err && wb[i].data !== (sel_p[i] ? voted : ex_res[i].data))) begin
          failures++;
          $display("FAIL wb%0d vl=%0d s=%0d p=%b: we=%b data=%h exp %h", i, v, sel_s, sel_p, wb[i].we, wb[i].data, voted);
        end
      end
      if (wb[sel_s].we && sel_p[sel_s]) seen[v]++;
      @(negedge clk);
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL voter %0d never wrote", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
