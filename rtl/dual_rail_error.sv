// dual_rail_error: self-checking ERROR output of a three-input word voter.
//
// ERROR is the 3-input NOR of the three pair-match signals (no two modules
// agree). Its complement rail ERROR_n is formed by a separate path from the
// inverted match signals (AND of the inverted matches, then inverted), so a
// single fault in either path makes the two rails equal. Legal dual-rail code
// words are (0,1) and (1,0); rail_fault reports the illegal (0,0) and (1,1).
// The checker on the two rails is this design's simplest choice (one XNOR).
// Purely combinational.
module dual_rail_error (
  input  logic m12,
  input  logic m23,
  input  logic m31,
  output logic error,
  output logic error_n,
  output logic rail_fault
);
  logic none_n;  // AND of inverted matches, second path

  always_comb begin
    error      = ~(m12 | m23 | m31);
    none_n     = (~m12) & (~m23) & (~m31);
    error_n    = ~none_n;
    rail_fault = ~(error ^ error_n);
  end
endmodule
