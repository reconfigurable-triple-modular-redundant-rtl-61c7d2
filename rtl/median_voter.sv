// median_voter: Median Diagnosable Word Voter (VL2).
//
// A three-input sorter orders the words (unsigned) into HIGH, MID and LOW
// while remembering which module each came from. Each module whose word
// differs from MID by more than delta (the tolerated range) is flagged in
// err_mod; when more than one module is flagged, error is raised and the
// output, otherwise MID, is disabled (reads 0). err_mod[0] is module 1.
// Combinational. Unsigned comparison and the strict "> delta" test are this
// design's choices.
module median_voter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  input  logic [WIDTH-1:0] in3,
  input  logic [WIDTH-1:0] delta,
  output logic [WIDTH-1:0] vout,
  output logic             out_en,
  output logic [2:0]       err_mod,
  output logic             error
);
  logic [WIDTH-1:0] hi, mid, lo;
  logic [WIDTH-1:0] dev [3];
  logic [WIDTH-1:0] w   [3];

  // sorter: rank of each word, ties broken by module order
  always_comb begin
    logic ge12, ge13, ge23;
    ge12 = (in1 >= in2);
    ge13 = (in1 >= in3);
    ge23 = (in2 >= in3);
    if (ge12 && ge13)      begin hi = in1; mid = ge23 ? in2 : in3; lo = ge23 ? in3 : in2; end
    else if (!ge12 && ge23) begin hi = in2; mid = ge13 ? in1 : in3; lo = ge13 ? in3 : in1; end
    else                   begin hi = in3; mid = ge12 ? in1 : in2; lo = ge12 ? in2 : in1; end
  end

  // comparator against the range around MID
  always_comb begin
    w[0] = in1;
    w[1] = in2;
    w[2] = in3;
    for (int i = 0; i < 3; i++) begin
      dev[i]     = (w[i] >= mid) ? (w[i] - mid) : (mid - w[i]);
      err_mod[i] = (dev[i] > delta);
    end
    error  = (err_mod[0] & err_mod[1]) | (err_mod[1] & err_mod[2]) | (err_mod[0] & err_mod[2]);
    out_en = ~error;
    vout   = out_en ? mid : '0;
  end
endmodule
