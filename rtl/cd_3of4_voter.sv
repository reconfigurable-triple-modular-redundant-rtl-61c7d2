// cd_3of4_voter: 3-of-4 Centralized Diagnosable Word Voter (VL3).
//
// Match logic forms the four triple matches m123, m234, m134, m124 (all three
// words equal). The output multiplexer passes module 2's word when m234 is
// set and module 1's word otherwise; both are the majority whenever any three
// modules agree. Exactly one triple matching names the remaining module as
// faulty (err_mod); no triple matching raises error and disables the output
// (reads 0); two or three triples matching, impossible for working equality
// checks, raises match_err. err_mod[0] is module 1. Combinational.
module cd_3of4_voter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  input  logic [WIDTH-1:0] in3,
  input  logic [WIDTH-1:0] in4,
  output logic [WIDTH-1:0] vout,
  output logic             out_en,
  output logic [3:0]       err_mod,
  output logic             error,
  output logic             match_err
);
  logic m123, m234, m134, m124;
  logic [2:0] nmatch;

  always_comb begin
    m123 = (in1 == in2) && (in2 == in3);
    m234 = (in2 == in3) && (in3 == in4);
    m134 = (in1 == in3) && (in3 == in4);
    m124 = (in1 == in2) && (in2 == in4);
    nmatch = 3'(m123) + 3'(m234) + 3'(m134) + 3'(m124);

    err_mod[0] = m234 & ~m123 & ~m134 & ~m124;
    err_mod[1] = m134 & ~m123 & ~m234 & ~m124;
    err_mod[2] = m124 & ~m123 & ~m234 & ~m134;
    err_mod[3] = m123 & ~m234 & ~m134 & ~m124;
    error      = (nmatch == 3'd0);
    match_err  = (nmatch == 3'd2) || (nmatch == 3'd3);

    out_en = ~error;
    vout   = out_en ? (m234 ? in2 : in1) : '0;
  end
endmodule
