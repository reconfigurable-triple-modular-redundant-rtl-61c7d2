// tb_cd_subword_voter: loads several masks (1, 8, 16 and 31 ignored bits as
// in the resource table, plus none) and votes on triples that differ inside
// and outside the ignored bits. Expected output (ignored bits 0), faulty
// module and ERROR are computed in the testbench. Also checks the mask
// register's reset value and that it loads only on mask_we.
module tb_cd_subword_voter;
  logic clk = 0, rst_n = 0, mask_we = 0;
  logic [31:0] mask_wdata = '0, mask, in1, in2, in3, vout;
  logic out_en, error, match_err;
  logic [2:0] err_mod;
  int checks = 0, failures = 0;

  cd_subword_voter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] masks [5];
    logic [31:0] good, exp_v, m;
    logic [2:0]  exp_m;
    logic        exp_e;
    masks[0] = 32'h0000_0000;
    masks[1] = 32'h0000_0001;
    masks[2] = 32'hFF00_0000;
    masks[3] = 32'h0F0F_0F0F;
    masks[4] = 32'hFFFF_FFFE;
    in1 = '0; in2 = '0; in3 = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (mask !== '0) begin failures++; $display("FAIL mask not cleared by reset"); end
    rst_n = 1;
    for (int s = 0; s < 5; s++) begin
      @(negedge clk);
      mask_wdata = masks[s]; mask_we = 1;
      @(negedge clk);
      mask_we = 0; mask_wdata = $urandom;
      @(negedge clk);
      checks++;
      if (mask !== masks[s]) begin failures++; $display("FAIL mask load %h", mask); end
      m = masks[s];
      for (int k = 0; k < 100; k++) begin
        good = $urandom;
        // differences inside the ignored bits never matter
        in1 = good ^ ($urandom & m); in2 = good ^ ($urandom & m); in3 = good ^ ($urandom & m);
        exp_m = 3'b000; exp_e = 1'b0; exp_v = good & ~m;
        if (~m != 0) begin
          unique case (k % 5)
            0: ;
            1: begin in1 = in1 ^ (~m & (~m ^ (~m - 1'b1)) ); exp_m = 3'b001; end
            2: begin in2 = in2 ^ ~m; exp_m = 3'b010; end
            3: begin in3 = in3 ^ (~m & (~m ^ (~m - 1'b1))); exp_m = 3'b100; end
            4: begin in1 = in1 ^ ~m; in3 = in3 ^ (~m & (~m ^ (~m - 1'b1)));
                     exp_e = (~m & (~m ^ (~m - 1'b1))) != ~m;
                     if (!exp_e) exp_m = 3'b010;
                     exp_v = exp_e ? '0 : (in1 & ~m); end
          endcase
        end
        #1;
        checks++;
        if (vout !== exp_v || error !== exp_e || err_mod !== exp_m || out_en !== ~exp_e || match_err) begin
          failures++;
          $display("FAIL mask=%h case %0d: vout=%h exp=%h err_mod=%b exp=%b error=%b", m, k % 5, vout, exp_v, err_mod, exp_m, error);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
