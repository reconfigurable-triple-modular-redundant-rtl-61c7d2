// tb_cd_word_voter: directed and random triples. Expected output, faulty
// module, ERROR and output enable are computed independently in the
// testbench for every case: all agree, each module wrong in turn, all differ.
module tb_cd_word_voter;
  logic [31:0] in1, in2, in3, vout;
  logic out_en, error, match_err;
  logic [2:0] err_mod;
  int checks = 0, failures = 0;

  cd_word_voter dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] good, bad, exp_v;
    logic [2:0]  exp_m;
    logic        exp_e;
    for (int k = 0; k < 500; k++) begin
      good = $urandom;
      bad  = good ^ (32'h1 << ($urandom % 32));
      in1 = good; in2 = good; in3 = good;
      exp_m = 3'b000; exp_e = 1'b0; exp_v = good;
      unique case (k % 5)
        0: ;
        1: begin in1 = bad; exp_m = 3'b001; end
        2: begin in2 = bad; exp_m = 3'b010; end
        3: begin in3 = bad; exp_m = 3'b100; end
        4: begin in2 = bad; in3 = bad ^ 32'h8000_0001; exp_e = 1'b1; exp_v = '0; end
      endcase
      #1;
      checks++;
      if (vout !== exp_v || out_en !== ~exp_e || err_mod !== exp_m || error !== exp_e || match_err !== 1'b0) begin
        failures++;
        $display("FAIL case %0d: vout=%h exp=%h err_mod=%b exp=%b error=%b", k % 5, vout, exp_v, err_mod, exp_m, error);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
