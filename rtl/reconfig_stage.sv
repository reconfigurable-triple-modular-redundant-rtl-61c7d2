// reconfig_stage: the Reconfigure pipeline stage between Execute and Write.
//
// Three 2:1 multiplexers with selects P0, P0.P1 and P0.P1.P2 place the
// Execute results of the (first three) selected processors, in processor
// order, on the three inputs of VL0 (centralized diagnosable word voter),
// VL1 (sub-word voter) and VL2 (median voter); VL3 (3-of-4 voter) takes all
// four results. EN0..EN3 pick the voter whose output and diagnosis are used.
// For processor i a multiplexer controlled by Pi passes the voted word or the
// processor's own result, and its write is enabled only when it is the
// fetching processor (S1 S0 = i) or not selected (Pi = 0). A voter that
// disables its output (error) also cancels the write: this design's choice.
// Diagnosis bits are renumbered from voter inputs to processors.
// Combinational apart from the sub-word voter's mask register.
module reconfig_stage
  import rq_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  exres_t           ex_res [NCORE],
  input  logic [1:0]       sel_s,
  input  logic [3:0]       sel_p,
  input  logic [3:0]       en,
  input  logic             mask_we,
  input  logic [WIDTH-1:0] mask_wdata,
  input  logic [WIDTH-1:0] delta,
  output exres_t           wb     [NCORE],
  output vdiag_t           vdiag
);
  logic [WIDTH-1:0] va, vb, vc;
  logic [1:0]       ia, ib, ic;   // processor behind each voter input

  logic [WIDTH-1:0] v0_out, v1_out, v2_out, v3_out, mask;
  logic             v0_en, v1_en, v2_en, v3_en;
  logic [2:0]       v0_em, v1_em, v2_em;
  logic [3:0]       v3_em;
  logic             v0_err, v1_err, v2_err, v3_err;
  logic             v0_me, v1_me, v3_me;

  logic [WIDTH-1:0] voted;
  logic             voted_en;
  logic [2:0]       em3;

  always_comb begin
    va = sel_p[0]                         ? ex_res[0].data[WIDTH-1:0] : ex_res[1].data[WIDTH-1:0];
    ia = sel_p[0]                         ? 2'd0 : 2'd1;
    vb = (sel_p[0] & sel_p[1])            ? ex_res[1].data[WIDTH-1:0] : ex_res[2].data[WIDTH-1:0];
    ib = (sel_p[0] & sel_p[1])            ? 2'd1 : 2'd2;
    vc = (sel_p[0] & sel_p[1] & sel_p[2]) ? ex_res[2].data[WIDTH-1:0] : ex_res[3].data[WIDTH-1:0];
    ic = (sel_p[0] & sel_p[1] & sel_p[2]) ? 2'd2 : 2'd3;
  end

  cd_word_voter #(.WIDTH(WIDTH)) u_vl0 (
    .in1(va), .in2(vb), .in3(vc),
    .vout(v0_out), .out_en(v0_en), .err_mod(v0_em), .error(v0_err), .match_err(v0_me)
  );

  cd_subword_voter #(.WIDTH(WIDTH)) u_vl1 (
    .clk(clk), .rst_n(rst_n), .mask_we(mask_we), .mask_wdata(mask_wdata), .mask(mask),
    .in1(va), .in2(vb), .in3(vc),
    .vout(v1_out), .out_en(v1_en), .err_mod(v1_em), .error(v1_err), .match_err(v1_me)
  );

  median_voter #(.WIDTH(WIDTH)) u_vl2 (
    .in1(va), .in2(vb), .in3(vc), .delta(delta),
    .vout(v2_out), .out_en(v2_en), .err_mod(v2_em), .error(v2_err)
  );

  cd_3of4_voter #(.WIDTH(WIDTH)) u_vl3 (
    .in1(ex_res[0].data[WIDTH-1:0]), .in2(ex_res[1].data[WIDTH-1:0]),
    .in3(ex_res[2].data[WIDTH-1:0]), .in4(ex_res[3].data[WIDTH-1:0]),
    .vout(v3_out), .out_en(v3_en), .err_mod(v3_em), .error(v3_err), .match_err(v3_me)
  );

  always_comb begin
    voted     = '0;
    voted_en  = 1'b0;
    em3       = '0;
    vdiag     = '0;
    unique case (1'b1)
      en[0]: begin voted = v0_out; voted_en = v0_en; em3 = v0_em;
                   vdiag.error = v0_err; vdiag.match_err = v0_me; vdiag.vl = VL_CDWV; end
      en[1]: begin voted = v1_out; voted_en = v1_en; em3 = v1_em;
                   vdiag.error = v1_err; vdiag.match_err = v1_me; vdiag.vl = VL_SUBW; end
      en[2]: begin voted = v2_out; voted_en = v2_en; em3 = v2_em;
                   vdiag.error = v2_err; vdiag.vl = VL_MEDIAN; end
      en[3]: begin voted = v3_out; voted_en = v3_en; vdiag.err_mod = v3_em;
                   vdiag.error = v3_err; vdiag.match_err = v3_me; vdiag.vl = VL_3OF4; end
      default: ;
    endcase
    if (!en[3]) begin
      if (em3[0]) vdiag.err_mod[ia] = 1'b1;
      if (em3[1]) vdiag.err_mod[ib] = 1'b1;
      if (em3[2]) vdiag.err_mod[ic] = 1'b1;
    end
    vdiag.active = (|en) & ex_res[sel_s].valid;
    if (!vdiag.active) begin
      vdiag.error     = 1'b0;
      vdiag.match_err = 1'b0;
      vdiag.err_mod   = '0;
    end

    for (int i = 0; i < NCORE; i++) begin
      wb[i]       = ex_res[i];
      if (sel_p[i]) wb[i].data = XLEN'(voted);
      wb[i].we    = ex_res[i].we
                  & ((sel_s == 2'(i)) | ~sel_p[i])
                  & (~sel_p[i] | voted_en);
    end
  end

  // at most one voting logic is enabled (2-4 decoder)
  a_onehot_en: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(en));
endmodule
