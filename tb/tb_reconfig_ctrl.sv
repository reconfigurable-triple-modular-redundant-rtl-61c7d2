// tb_reconfig_ctrl: directed sequence for the reconfiguration controller:
// reset state, RECONFIG OFF in MIMD mode, RECONFIG ON waiting for its own and
// the selected processors' pipelines to drain (with the selected processors
// frozen meanwhile), the TMR mode freezing the selected non-fetching
// processors, a fourth processor's RECONFIG stalled during TMR, RECONFIG OFF
// from the fetching processor, simultaneous requests (lowest first) and a
// 4MR configuration with the 3-of-4 voter.
module tb_reconfig_ctrl;
  import rq_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic [3:0] req = '0, busy = '0, be_busy = '0;
  rcfg_t      req_fields [NCORE];
  logic [3:0] grant, freeze;
  rcfg_t      cfg;
  logic       pending;
  int checks = 0, failures = 0;

  reconfig_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(string what, logic [3:0] g, logic [3:0] f, logic pend, rcfg_t c);
    checks++;
    if (grant !== g || freeze !== f || pending !== pend || cfg !== c) begin
      failures++;
      $display("FAIL %s: grant=%b/%b freeze=%b/%b pending=%b/%b cfg=%h/%h", what, grant, g, freeze, f, pending, pend, cfg, c);
    end
  endtask

  function automatic rcfg_t mk(logic on, logic [1:0] s, logic [3:0] p, vl_e v);
    rcfg_t r;
    r.on = on; r.s = s; r.p = p; r.v = v;
    return r;
  endfunction

  initial begin
    rcfg_t on0, on3, on2, on4;
    for (int i = 0; i < 4; i++) req_fields[i] = '0;
    on0 = mk(1'b1, 2'd0, 4'b0111, VL_CDWV);    // processors 0,1,2, 0 fetches
    on3 = mk(1'b1, 2'd3, 4'b1011, VL_MEDIAN);  // processors 0,1,3, 3 fetches
    on2 = mk(1'b1, 2'd2, 4'b0110, VL_SUBW);
    on4 = mk(1'b1, 2'd1, 4'b1111, VL_3OF4);
    @(posedge clk); #1;
    expect_state("reset", 4'b0000, 4'b0000, 1'b0, '0);
    @(negedge clk); rst_n = 1;

    // RECONFIG OFF in MIMD mode: granted at once, no change
    req = 4'b0010; req_fields[1] = '0;
    #1 expect_state("off in mimd", 4'b0010, 4'b0000, 1'b0, '0);
    @(negedge clk); req = '0;

    // RECONFIG ON from processor 0 while pipelines are busy
    req = 4'b0001; req_fields[0] = on0; busy = 4'b0001; be_busy = 4'b0010;
    #1 expect_state("on waits for requester", 4'b0000, 4'b0110, 1'b1, '0);
    @(negedge clk); busy = 4'b0000;
    #1 expect_state("on waits for selected", 4'b0000, 4'b0110, 1'b1, '0);
    @(negedge clk); be_busy = 4'b1000;   // unselected processor busy: irrelevant
    #1 expect_state("on granted", 4'b0001, 4'b0110, 1'b0, '0);
    @(negedge clk); req = '0;
    #1 expect_state("tmr active", 4'b0000, 4'b0110, 1'b0, on0);

    // processor 3 fetches RECONFIG ON during TMR: stalled
    req = 4'b1000; req_fields[3] = on3;
    repeat (3) begin
      @(negedge clk);
      expect_state("4th processor stalled", 4'b0000, 4'b0110, 1'b0, on0);
    end

    // processor 0 fetches RECONFIG OFF; selected processor 2 still busy
    req = 4'b1001; req_fields[0] = '0; be_busy = 4'b0100;
    #1 expect_state("off waits", 4'b0000, 4'b0110, 1'b1, on0);
    @(negedge clk); be_busy = 4'b0000;
    #1 expect_state("off granted", 4'b0001, 4'b0110, 1'b0, on0);
    @(negedge clk); req = 4'b1000;
    // back in MIMD: processor 3's waiting RECONFIG ON now proceeds
    #1 expect_state("3 granted", 4'b1000, 4'b0011, 1'b0, '0);
    @(negedge clk); req = '0;
    #1 expect_state("tmr by 3", 4'b0000, 4'b0011, 1'b0, on3);
    req = 4'b1000; req_fields[3] = '0;
    #1 expect_state("off by 3", 4'b1000, 4'b0011, 1'b0, on3);
    @(negedge clk); req = '0;

    // simultaneous requests from 2 and 3: 2 first
    req = 4'b1100; req_fields[2] = on2; req_fields[3] = on3;
    #1 expect_state("2 wins", 4'b0100, 4'b0010, 1'b0, '0);
    @(negedge clk);
    req = 4'b1000;
    #1 expect_state("3 waits", 4'b0000, 4'b0010, 1'b0, on2);
    @(negedge clk);
    req = 4'b1100; req_fields[2] = '0;
    #1 expect_state("2 off", 4'b0100, 4'b0010, 1'b0, on2);
    @(negedge clk); req = '0;

    // 4MR: processor 1 fetches, all four selected
    req = 4'b0010; req_fields[1] = on4;
    #1 expect_state("4mr", 4'b0010, 4'b1101, 1'b0, '0);
    @(negedge clk); req = '0;
    #1 expect_state("4mr active", 4'b0000, 4'b1101, 1'b0, on4);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
