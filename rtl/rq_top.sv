// rq_top: reconfigurable four-processor system with run-time TMR/4MR.
//
// Four rq_core processors normally run their own programs (MIMD). A
// RECONFIG ON instruction names the processors to combine (P0..P3), the one
// that keeps fetching (S1 S0) and the voting logic (V1 V0). While it is
// active, the fetching processor's Read-stage output is broadcast by the
// operand router to the Execute stages of all selected processors, the
// other selected processors' front ends are stalled, and the Reconfigure
// stage votes on their Execute results with VL0 (word), VL1 (sub-word),
// VL2 (median) or VL3 (3-of-4) and writes the voted word only into the
// fetching processor's registers. Unselected processors keep running on
// their own. RECONFIG OFF returns to MIMD mode.
// The sub-word voter mask and the median voter range are loaded through
// mask_we / delta_we. The enhanced exact word voter with dual-rail
// self-checking outputs stands beside the processors on its own ports.
// All state resets asynchronously on rst_n low; programs are loaded through
// imem_* (this design's choice) while or after reset.
module rq_top
  import rq_pkg::*;
#(
  parameter int unsigned WIDTH      = 32,
  parameter int unsigned IMEM_DEPTH = 256,
  localparam int unsigned AW = $clog2(IMEM_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             imem_we,
  input  logic [1:0]       imem_core,
  input  logic [AW-1:0]    imem_addr,
  input  logic [ILEN-1:0]  imem_wdata,
  input  logic             mask_we,
  input  logic [WIDTH-1:0] mask_wdata,
  input  logic             delta_we,
  input  logic [WIDTH-1:0] delta_wdata,
  input  logic [XLEN-1:0]  fault_inj  [NCORE],
  output logic [3:0]       halted,
  output logic [31:0]      exec_count [NCORE],
  output rcfg_t            cfg,
  output logic [3:0]       freeze,
  output logic             rc_pending,
  output vdiag_t           vdiag,
  input  logic [1:0]       dbg_core,
  input  logic [3:0]       dbg_raddr,
  output logic [XLEN-1:0]  dbg_rdata,
  // stand-alone enhanced exact word voter
  input  logic [WIDTH-1:0] ewv_in1,
  input  logic [WIDTH-1:0] ewv_in2,
  input  logic [WIDTH-1:0] ewv_in3,
  output logic [WIDTH-1:0] ewv_z,
  output logic [WIDTH-1:0] ewv_z_n,
  output logic             ewv_error,
  output logic             ewv_error_n,
  output logic             ewv_rail_fault
);
  issue_t          rd_out [NCORE];
  issue_t          ex_in  [NCORE];
  exres_t          ex_res [NCORE];
  exres_t          wb     [NCORE];
  logic [3:0]      req, grant, busy, be_busy;
  rcfg_t           req_fields [NCORE];
  logic [XLEN-1:0] dbg_data [NCORE];
  logic [WIDTH-1:0] delta;
  logic [3:0]      en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        delta <= '0;
    else if (delta_we) delta <= delta_wdata;
  end

  for (genvar i = 0; i < NCORE; i++) begin : g_core
    rq_core #(.IMEM_DEPTH(IMEM_DEPTH)) u_core (
      .clk(clk), .rst_n(rst_n),
      .imem_we(imem_we && imem_core == 2'(i)), .imem_addr(imem_addr), .imem_wdata(imem_wdata),
      .rd_out(rd_out[i]), .ex_in(ex_in[i]), .ex_res(ex_res[i]), .wb_in(wb[i]),
      .freeze(freeze[i]), .rc_req(req[i]), .rc_fields(req_fields[i]), .rc_grant(grant[i]),
      .busy(busy[i]), .be_busy(be_busy[i]),
      .fault_inj(fault_inj[i]), .halted(halted[i]), .exec_count(exec_count[i]),
      .dbg_raddr(dbg_raddr), .dbg_rdata(dbg_data[i])
    );
  end

  assign dbg_rdata = dbg_data[dbg_core];

  reconfig_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .req(req), .req_fields(req_fields),
    .busy(busy), .be_busy(be_busy), .grant(grant), .freeze(freeze),
    .cfg(cfg), .pending(rc_pending)
  );

  // 2-4 decoder of the active V1 V0, enabled by ON
  always_comb begin
    en = '0;
    if (cfg.on) en[cfg.v] = 1'b1;
  end

  operand_router u_route (
    .rd_out(rd_out), .sel_s(cfg.s), .sel_p(cfg.p), .ex_in(ex_in)
  );

  reconfig_stage #(.WIDTH(WIDTH)) u_rcs (
    .clk(clk), .rst_n(rst_n), .ex_res(ex_res), .sel_s(cfg.s), .sel_p(cfg.p), .en(en),
    .mask_we(mask_we), .mask_wdata(mask_wdata), .delta(delta),
    .wb(wb), .vdiag(vdiag)
  );

  exact_word_voter #(.WIDTH(WIDTH)) u_ewv (
    .in1(ewv_in1), .in2(ewv_in2), .in3(ewv_in3),
    .z(ewv_z), .z_n(ewv_z_n), .error(ewv_error), .error_n(ewv_error_n),
    .rail_fault(ewv_rail_fault)
  );
endmodule
