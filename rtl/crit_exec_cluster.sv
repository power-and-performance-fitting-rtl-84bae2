// crit_exec_cluster: criticality-based instruction scheduling onto a mix of
// fast and slow integer functional units.
//
// Idea: instructions off the critical path can take longer without making
// the program slower, so they can run on slow, low-voltage units while only
// critical instructions use the fast, power-hungry ones. Each cycle the
// cluster
//   1. looks up the PC of every issuing instruction in the CPP buffer, which
//      predicts it critical or not (combinational, same cycle);
//   2. steers the instructions onto free fast and slow units by that
//      prediction (crit_dispatch, with fallback to the other kind of unit);
//   3. executes them: a fast unit returns its result one cycle after issue,
//      a slow unit two cycles after issue.
// At commit, the criticality of retired instructions (found by a detector
// outside this cluster) trains the CPP buffer through the upd_* ports.
//
// Interface
//   iss_valid/iss_pc/iss_req  up to ISSUE_W instructions, slot 0 oldest.
//   iss_grant                 which slots were dispatched this cycle; a slot
//                             not granted must be presented again.
//   iss_pred_crit, iss_class  the prediction and where the slot went.
//   fast_res[f], slow_res[s]  result buses of the units.
//   upd_*                     COMMIT_W training ports.
//   cpp_init_busy             high for CPP_ENTRIES cycles after reset while
//                             the buffer clears itself; instructions still
//                             issue, all predicted non-critical.
// Defaults are the evaluated configuration: 3 fast and 3 slow units, 8-wide
// issue and commit, a 4K-entry buffer of 6-bit counters (+8 / -1, threshold
// 8), pipelined slow units. The PC width and the tag scheme are this
// design's own.
module crit_exec_cluster
  import fu_pkg::*;
#(
  parameter int unsigned ISSUE_W     = 8,
  parameter int unsigned COMMIT_W    = 8,
  parameter int unsigned N_FAST      = 3,
  parameter int unsigned N_SLOW      = 3,
  parameter bit          PIPELINED   = 1'b1,
  parameter int unsigned CPP_ENTRIES = 4096,
  parameter int unsigned CTR_W       = 6,
  parameter int unsigned CTR_INC     = 8,
  parameter int unsigned CTR_DEC     = 1,
  parameter int unsigned CTR_THRESH  = 8,
  parameter int unsigned PC_W        = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [ISSUE_W-1:0]            iss_valid,
  input  logic [ISSUE_W-1:0][PC_W-1:0]  iss_pc,
  input  fu_req_t [ISSUE_W-1:0]         iss_req,
  output logic [ISSUE_W-1:0]            iss_grant,
  output logic [ISSUE_W-1:0]            iss_pred_crit,
  output disp_class_e [ISSUE_W-1:0]     iss_class,
  output fu_res_t [N_FAST-1:0]          fast_res,
  output fu_res_t [N_SLOW-1:0]          slow_res,
  input  logic [COMMIT_W-1:0]           upd_valid,
  input  logic [COMMIT_W-1:0][PC_W-1:0] upd_pc,
  input  logic [COMMIT_W-1:0]           upd_crit,
  output logic                          cpp_init_busy
);

  localparam int unsigned UIDX_W = $clog2((N_FAST > N_SLOW ? N_FAST : N_SLOW) + 1);
  localparam int unsigned SLOT_W = $clog2(ISSUE_W + 1);

  logic [ISSUE_W-1:0][CTR_W-1:0]  ctr_unused;
  logic [ISSUE_W-1:0][UIDX_W-1:0] unit_unused;
  logic [N_FAST-1:0]              fast_ready, fast_sel;
  logic [N_SLOW-1:0]              slow_ready, slow_sel;
  logic [N_FAST-1:0][SLOT_W-1:0]  fast_slot;
  logic [N_SLOW-1:0][SLOT_W-1:0]  slow_slot;

  cpp_buffer #(
    .ENTRIES (CPP_ENTRIES),
    .CTR_W   (CTR_W),
    .INC     (CTR_INC),
    .DEC     (CTR_DEC),
    .THRESH  (CTR_THRESH),
    .RD_PORTS(ISSUE_W),
    .WR_PORTS(COMMIT_W),
    .PC_W    (PC_W)
  ) u_cpp (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_pc    (iss_pc),
    .rd_crit  (iss_pred_crit),
    .rd_ctr   (ctr_unused),
    .upd_valid(upd_valid),
    .upd_pc   (upd_pc),
    .upd_crit (upd_crit),
    .init_busy(cpp_init_busy)
  );

  crit_dispatch #(
    .ISSUE_W(ISSUE_W),
    .N_FAST (N_FAST),
    .N_SLOW (N_SLOW)
  ) u_disp (
    .cand_valid(iss_valid),
    .cand_crit (iss_pred_crit),
    .fast_ready(fast_ready),
    .slow_ready(slow_ready),
    .cand_grant(iss_grant),
    .cand_class(iss_class),
    .cand_unit (unit_unused),
    .fast_sel  (fast_sel),
    .fast_slot (fast_slot),
    .slow_sel  (slow_sel),
    .slow_slot (slow_slot)
  );

  for (genvar f = 0; f < N_FAST; f++) begin : g_fast
    fast_fu u_fu (
      .clk     (clk),
      .rst_n   (rst_n),
      .in_valid(fast_sel[f]),
      .in_req  (iss_req[fast_slot[f]]),
      .in_ready(fast_ready[f]),
      .res     (fast_res[f])
    );
  end

  for (genvar s = 0; s < N_SLOW; s++) begin : g_slow
    slow_fu #(.PIPELINED(PIPELINED)) u_fu (
      .clk     (clk),
      .rst_n   (rst_n),
      .in_valid(slow_sel[s]),
      .in_req  (iss_req[slow_slot[s]]),
      .in_ready(slow_ready[s]),
      .res     (slow_res[s])
    );
  end

endmodule
