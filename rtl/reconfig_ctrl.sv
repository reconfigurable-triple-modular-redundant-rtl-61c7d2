// reconfig_ctrl: run-time switching between MIMD and TMR/4MR modes.
//
// Holds the active configuration (ON, S1 S0, P0..P3, V1 V0); all-zero fields
// mean MIMD mode. A processor whose Decode stage holds a RECONFIG raises req
// with the decoded fields. Requests are served lowest processor first.
//  * MIMD mode, RECONFIG ON from processor r: the selected processors other
//    than r and S stop issuing at once (freeze). When r has nothing left in
//    Read, Execute, Reconfigure or Write, and the selected processors and S
//    have nothing in Execute, Reconfigure or Write, the fields are loaded and
//    r's RECONFIG is granted. From then on every selected processor except
//    S stays frozen and executes only what S issues.
//  * Active mode: only S (the processor that fetches) may reconfigure. Its
//    RECONFIG OFF, after the same draining, clears the configuration. A
//    RECONFIG from any other processor waits (stalls) until MIMD returns.
//  * MIMD mode, RECONFIG OFF: granted at once, it changes nothing.
// Draining before each switch, so that every instruction in flight runs under
// one configuration, is this design's choice. Registers reset asynchronously
// (active low) to MIMD mode.
module reconfig_ctrl
  import rq_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] req,
  input  rcfg_t      req_fields [NCORE],
  input  logic [3:0] busy,      // Read..Write hold an instruction
  input  logic [3:0] be_busy,   // Execute..Write hold an instruction
  output logic [3:0] grant,
  output logic [3:0] freeze,
  output rcfg_t      cfg,
  output logic       pending    // a RECONFIG waits for draining
);
  rcfg_t      nxt;
  logic       found;
  logic [1:0] r;
  logic [3:0] involved;
  logic       drained;

  always_comb begin
    found    = 1'b0;
    r        = '0;
    for (int i = NCORE - 1; i >= 0; i--) begin
      if (req[i] && (!cfg.on || cfg.s == 2'(i))) begin
        found = 1'b1;
        r     = 2'(i);
      end
    end

    nxt      = req_fields[r].on ? req_fields[r] : '0;
    involved = cfg.p | nxt.p;
    if (cfg.on) involved[cfg.s] = 1'b1;
    if (nxt.on) involved[nxt.s] = 1'b1;
    drained  = !busy[r] && ((be_busy & involved) == 4'b0000);

    grant    = '0;
    pending  = 1'b0;
    if (found) begin
      if (!cfg.on && !nxt.on) grant[r] = 1'b1;      // OFF in MIMD: nothing to do
      else if (drained)       grant[r] = 1'b1;
      else                    pending  = 1'b1;
    end

    freeze = '0;
    if (cfg.on) begin
      freeze = cfg.p;
      freeze[cfg.s] = 1'b0;
    end
    if (found && nxt.on) begin
      for (int j = 0; j < NCORE; j++)
        if (nxt.p[j] && 2'(j) != nxt.s && 2'(j) != r) freeze[j] = 1'b1;
    end
    if (found && cfg.on) freeze[r] = 1'b0;  // the fetching processor never stops
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cfg <= '0;
    else if (|grant) cfg <= nxt;
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
