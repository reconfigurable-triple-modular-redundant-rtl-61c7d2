// cd_subword_voter: Centralized Diagnosable Sub-Word Voter (VL1).
//
// A mask register marks the bits to be ignored (mask bit 1 = ignored). The
// three words are masked (ignored bits forced to 0) and then voted and
// diagnosed exactly as by the Centralized Diagnosable Word Voter, so only the
// unmasked bits must agree and the ignored bits read 0 at the output. The
// mask register is loaded with mask_we on the rising clock edge and cleared
// by the asynchronous active-low reset; the voting path is combinational.
// Loading the mask through a write port is this design's choice.
module cd_subword_voter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mask_we,
  input  logic [WIDTH-1:0] mask_wdata,
  output logic [WIDTH-1:0] mask,
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  input  logic [WIDTH-1:0] in3,
  output logic [WIDTH-1:0] vout,
  output logic             out_en,
  output logic [2:0]       err_mod,
  output logic             error,
  output logic             match_err
);
  logic [WIDTH-1:0] x1, x2, x3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       mask <= '0;
    else if (mask_we) mask <= mask_wdata;
  end

  always_comb begin
    x1 = in1 & ~mask;
    x2 = in2 & ~mask;
    x3 = in3 & ~mask;
  end

  cd_word_voter #(.WIDTH(WIDTH)) u_vote (
    .in1(x1), .in2(x2), .in3(x3),
    .vout(vout), .out_en(out_en), .err_mod(err_mod),
    .error(error), .match_err(match_err)
  );
endmodule
