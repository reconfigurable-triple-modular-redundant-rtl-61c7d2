// tb_exact_word_voter: random and directed triples (all agree, one module
// wrong, two pairs impossible, all different) at the default 32-bit width
// and at 8 and 64 bits. The expected majority word and ERROR are computed in the
// testbench; the complement rails must mirror the true rails.
module tb_exact_word_voter;
  localparam int W = 32;
  logic [W-1:0] in1, in2, in3, z, z_n;
  logic error, error_n, rail_fault;
  logic [7:0] s1, s2, s3, sz, szn;
  logic se, sen, srf;
  logic [63:0] w1, w2, w3, wz, wzn;
  logic we, wen, wrf;
  int checks = 0, failures = 0;

  exact_word_voter dut (.in1, .in2, .in3, .z, .z_n, .error, .error_n, .rail_fault);
  exact_word_voter #(.WIDTH(8)) dut8 (.in1(s1), .in2(s2), .in3(s3), .z(sz), .z_n(szn),
                                      .error(se), .error_n(sen), .rail_fault(srf));
  exact_word_voter #(.WIDTH(64)) dut64 (.in1(w1), .in2(w2), .in3(w3), .z(wz), .z_n(wzn),
                                        .error(we), .error_n(wen), .rail_fault(wrf));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32();
    logic [W-1:0] exp_z;
    logic exp_e;
    exp_e = 1'b0;
    if (in1 == in2 || in1 == in3) exp_z = in1;
    else if (in2 == in3)          exp_z = in2;
    else begin exp_z = '0; exp_e = 1'b1; end
    #1;
    checks++;
    if (error !== exp_e || error_n !== ~exp_e || rail_fault !== 1'b0 ||
        (!exp_e && z !== exp_z) || z_n !== ~z) begin
      failures++;
      $display("FAIL %h %h %h: z=%h exp=%h err=%b", in1, in2, in3, z, exp_z, error);
    end
  endtask

  initial begin
    logic [W-1:0] good;
    for (int k = 0; k < 400; k++) begin
      good = $urandom;
      in1 = good; in2 = good; in3 = good;
      unique case (k % 5)
        0: ;
        1: in1 = good ^ (32'h1 << ($urandom % W));
        2: in2 = good ^ $urandom;
        3: in3 = good ^ (32'h1 << ($urandom % W));
        4: begin in1 = $urandom; in2 = $urandom; in3 = $urandom; end
      endcase
      if (k % 5 == 2 && in2 == good) in2 = ~good;
      check32();
    end
    for (int k = 0; k < 200; k++) begin
      s1 = 8'($urandom); s2 = (k % 2) ? s1 : 8'($urandom); s3 = (k % 3 == 0) ? s2 : 8'($urandom);
      #1;
      checks++;
      if ((s1 == s2 || s1 == s3) && sz !== s1) failures++;
      else if (s1 != s2 && s1 != s3 && s2 == s3 && sz !== s2) failures++;
      else if ((s1 != s2 && s2 != s3 && s1 != s3) !== se || szn !== ~sz || srf) failures++;
    end
    for (int k = 0; k < 200; k++) begin
      w1 = {$urandom, $urandom};
      w2 = (k % 2) ? w1 : w1 ^ (64'h1 << ($urandom % 63));
      w3 = (k % 3 == 0) ? w1 ^ (64'h1 << 63) : w1;
      #1;
      checks++;
      if (k % 2 == 1 || k % 3 != 0) begin
        if (wz !== w1 || we) failures++;
      end else if (!we || wen) failures++;
      if (wzn !== ~wz || wrf) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
