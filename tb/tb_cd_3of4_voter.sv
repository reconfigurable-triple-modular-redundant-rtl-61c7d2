// tb_cd_3of4_voter: all four agree, each module wrong in turn, two modules
// wrong (no majority of three). Expected word, faulty module and ERROR are
// worked out in the testbench.
module tb_cd_3of4_voter;
  logic [31:0] in1, in2, in3, in4, vout;
  logic out_en, error, match_err;
  logic [3:0] err_mod;
  int checks = 0, failures = 0;

  cd_3of4_voter dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] good, w[4], exp_v;
    logic [3:0]  exp_m;
    logic        exp_e;
    int          c;
    for (int k = 0; k < 600; k++) begin
      good = $urandom;
      for (int i = 0; i < 4; i++) w[i] = good;
      c = k % 6;
      exp_m = '0; exp_e = 1'b0; exp_v = good;
      if (c >= 1 && c <= 4) begin
        w[c-1] = good ^ (32'h1 << ($urandom % 32));
        exp_m[c-1] = 1'b1;
      end else if (c == 5) begin
        w[$urandom % 2] = ~good;
        w[2 + $urandom % 2] = good + 1;
        exp_e = 1'b1; exp_v = '0;
      end
      {in1, in2, in3, in4} = {w[0], w[1], w[2], w[3]};
      #1;
      checks++;
      if (vout !== exp_v || err_mod !== exp_m || error !== exp_e || out_en !== ~exp_e || match_err !== 1'b0) begin
        failures++;
        $display("FAIL case %0d: vout=%h exp=%h err_mod=%b exp=%b error=%b", c, vout, exp_v, err_mod, exp_m, error);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
