// cd_word_voter: Centralized Diagnosable Word Voter (VL0).
//
// Match logic compares the three words pairwise (m12, m23, m31). The output
// multiplexer passes module 2's word, or module 1's word when m31 is set:
// either is the majority whenever any pair agrees. Combinational logic
// diagnoses the state: exactly one pair agreeing names the third module as
// faulty (err_mod), no pair agreeing raises error and disables the output,
// and exactly two pairs agreeing (impossible for a working equality check)
// raises match_err. A disabled output reads 0; out_en tells when it is valid.
// err_mod[0] is module 1. Combinational.
module cd_word_voter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  input  logic [WIDTH-1:0] in3,
  output logic [WIDTH-1:0] vout,
  output logic             out_en,
  output logic [2:0]       err_mod,
  output logic             error,
  output logic             match_err
);
  logic m12, m23, m31;

  always_comb begin
    m12 = (in1 == in2);
    m23 = (in2 == in3);
    m31 = (in3 == in1);

    err_mod[0] =  m23 & ~m12 & ~m31;
    err_mod[1] =  m31 & ~m12 & ~m23;
    err_mod[2] =  m12 & ~m23 & ~m31;
    error      = ~(m12 | m23 | m31);
    match_err  = (m12 & m23 & ~m31) | (m23 & m31 & ~m12) | (m31 & m12 & ~m23);

    out_en = ~error;
    vout   = out_en ? (m31 ? in1 : in2) : '0;
  end
endmodule
