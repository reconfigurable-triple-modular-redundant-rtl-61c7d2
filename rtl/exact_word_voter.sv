// exact_word_voter: enhanced Exact Word Voter for a TMR system.
//
// Three word-wide equality checks (per-bit XNOR, then AND) give m12, m23,
// m31. When modules 1 and 2 agree their word is passed, otherwise module 3's
// word is passed; this is correct whenever any two modules agree. ERROR is
// raised when no pair agrees. As a totally self-checking enhancement every
// output bit and ERROR also exist on a complement rail built from the
// inverted inputs through separate selection logic, and rail_fault flags any
// pair of rails that is not complementary (a fault inside the voter).
// Combinational, WIDTH-bit words.
module exact_word_voter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  input  logic [WIDTH-1:0] in3,
  output logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0] z_n,
  output logic             error,
  output logic             error_n,
  output logic             rail_fault
);
  logic m12, m23, m31;
  logic err_fault;

  always_comb begin
    m12 = &(in1 ~^ in2);
    m23 = &(in2 ~^ in3);
    m31 = &(in3 ~^ in1);
  end

  dual_rail_error u_err (
    .m12(m12), .m23(m23), .m31(m31),
    .error(error), .error_n(error_n), .rail_fault(err_fault)
  );

  always_comb begin
    // true rail: 2n AND + n OR selection
    z   = ({WIDTH{m12}} & in1) | ({WIDTH{~m12}} & in3);
    // complement rail from inverted inputs
    z_n = ({WIDTH{m12}} & ~in1) | ({WIDTH{~m12}} & ~in3);
    rail_fault = err_fault | ~(&(z ^ z_n));
  end
endmodule
