// operand_router: interconnect between the Read and Execute stages.
//
// A 4:1 multiplexer controlled by S1 S0 picks the Read-stage output of the
// fetching processor as the broadcast. For each processor a 2:1 multiplexer
// controlled by its select bit Pi feeds its Execute stage with the broadcast
// (Pi = 1) or with its own Read-stage output (Pi = 0). With P = 0000
// (RECONFIG OFF) every processor executes its own instructions.
// Combinational; the valid bit of each bundle travels with it.
module operand_router
  import rq_pkg::*;
(
  input  issue_t     rd_out [NCORE],
  input  logic [1:0] sel_s,
  input  logic [3:0] sel_p,
  output issue_t     ex_in  [NCORE]
);
  issue_t bcast;

  always_comb begin
    bcast = rd_out[sel_s];
    for (int i = 0; i < NCORE; i++)
      ex_in[i] = sel_p[i] ? bcast : rd_out[i];
  end
endmodule
