// tb_median_voter: random triples around a common value with random
// deviations and thresholds. The testbench sorts the three words itself,
// takes the middle one, flags every word further than delta from it and
// expects ERROR when two or more are flagged.
module tb_median_voter;
  logic [31:0] in1, in2, in3, delta, vout;
  logic out_en, error;
  logic [2:0] err_mod;
  int checks = 0, failures = 0;
  int n_err = 0, n_one = 0;

  median_voter dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] absdiff(logic [31:0] a, logic [31:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  initial begin
    logic [31:0] base, w[3], med, t;
    logic [2:0]  exp_m;
    logic        exp_e;
    for (int k = 0; k < 1000; k++) begin
      base  = 32'h1000_0000 + $urandom % 32'h1000_0000;
      delta = $urandom % 64;
      for (int i = 0; i < 3; i++) w[i] = base + ($urandom % 128) - 64;
      if (k % 7 == 0) w[$urandom % 3] = $urandom;
      in1 = w[0]; in2 = w[1]; in3 = w[2];
      // reference: bubble sort
      for (int a = 0; a < 2; a++)
        for (int b = 0; b < 2 - a; b++)
          if (w[b] > w[b+1]) begin t = w[b]; w[b] = w[b+1]; w[b+1] = t; end
      med = w[1];
      exp_m[0] = absdiff(in1, med) > delta;
      exp_m[1] = absdiff(in2, med) > delta;
      exp_m[2] = absdiff(in3, med) > delta;
      exp_e    = $countones(exp_m) >= 2;
      if (exp_e) n_err++;
      if ($countones(exp_m) == 1) n_one++;
      #1;
      checks++;
      if (err_mod !== exp_m || error !== exp_e || out_en !== ~exp_e || vout !== (exp_e ? 32'h0 : med)) begin
        failures++;
        $display("FAIL %h %h %h d=%0d: vout=%h med=%h err_mod=%b exp=%b", in1, in2, in3, delta, vout, med, err_mod, exp_m);
      end
    end
    checks++;
    if (n_err == 0 || n_one == 0) begin failures++; $display("FAIL coverage err=%0d one=%0d", n_err, n_one); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
