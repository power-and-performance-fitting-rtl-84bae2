// power_fit_top: the two energy-saving mechanisms side by side.
//
//   u_cluster  criticality-based instruction scheduling: a CPP buffer
//              predicts which issuing instructions are critical; those go to
//              fast units, the rest to slow, low-voltage units
//              (crit_exec_cluster, 3 fast + 3 slow units, 4K-entry buffer).
//   u_contrail the Contrail verification-thread scheduler: regions skipped
//              by value prediction in the speculation stream are queued and
//              verified on slow verification contexts, with squash and
//              recovery on a misprediction (contrail_vscheduler).
// The two share no signals: the out-of-order core that issues into the
// cluster, the criticality detector that trains it, the value predictor that
// spawns verification threads and the speculation and verification
// pipelines lie outside and connect through the ports below (ports prefixed
// ex_ for the cluster, ct_ for the Contrail scheduler). All timing is that
// of the two blocks.
module power_fit_top
  import fu_pkg::*;
  import contrail_pkg::*;
#(
  parameter int unsigned ISSUE_W     = 8,
  parameter int unsigned COMMIT_W    = 8,
  parameter int unsigned N_FAST      = 3,
  parameter int unsigned N_SLOW      = 3,
  parameter bit          PIPELINED   = 1'b1,
  parameter int unsigned CPP_ENTRIES = 4096,
  parameter int unsigned N_VCTX      = 2,
  parameter int unsigned FIFO_DEPTH  = 4
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // criticality-steered execution cluster
  input  logic [ISSUE_W-1:0]                    ex_iss_valid,
  input  logic [ISSUE_W-1:0][31:0]              ex_iss_pc,
  input  fu_req_t [ISSUE_W-1:0]                 ex_iss_req,
  output logic [ISSUE_W-1:0]                    ex_iss_grant,
  output logic [ISSUE_W-1:0]                    ex_iss_pred_crit,
  output disp_class_e [ISSUE_W-1:0]             ex_iss_class,
  output fu_res_t [N_FAST-1:0]                  ex_fast_res,
  output fu_res_t [N_SLOW-1:0]                  ex_slow_res,
  input  logic [COMMIT_W-1:0]                   ex_upd_valid,
  input  logic [COMMIT_W-1:0][31:0]             ex_upd_pc,
  input  logic [COMMIT_W-1:0]                   ex_upd_crit,
  output logic                                  ex_cpp_init_busy,
  // Contrail verification-thread scheduler
  input  logic                                  ct_spawn_valid,
  output logic                                  ct_spawn_ready,
  input  logic [PC_W-1:0]                       ct_spawn_start_pc,
  input  logic [PC_W-1:0]                       ct_spawn_resume_pc,
  output logic [SEQ_W-1:0]                      ct_spawn_seq,
  output logic [N_VCTX-1:0]                     ct_ctx_start,
  output vthread_t [N_VCTX-1:0]                 ct_ctx_thread,
  output logic [N_VCTX-1:0]                     ct_ctx_busy,
  input  logic [N_VCTX-1:0]                     ct_ctx_done,
  input  logic [N_VCTX-1:0]                     ct_ctx_mispredict,
  output logic [N_VCTX-1:0]                     ct_ctx_abort,
  output logic                                  ct_squash_valid,
  output logic [SEQ_W-1:0]                      ct_squash_seq,
  output logic [PC_W-1:0]                       ct_squash_resume_pc,
  output logic [$clog2(N_VCTX+1)-1:0]           ct_squash_ctx,
  output logic                                  ct_retire_valid,
  output logic [SEQ_W-1:0]                      ct_retire_seq,
  output logic                                  ct_all_verified,
  output logic [$clog2(FIFO_DEPTH+1)-1:0]       ct_queued
);

  crit_exec_cluster #(
    .ISSUE_W    (ISSUE_W),
    .COMMIT_W   (COMMIT_W),
    .N_FAST     (N_FAST),
    .N_SLOW     (N_SLOW),
    .PIPELINED  (PIPELINED),
    .CPP_ENTRIES(CPP_ENTRIES),
    .PC_W       (32)
  ) u_cluster (
    .clk          (clk),
    .rst_n        (rst_n),
    .iss_valid    (ex_iss_valid),
    .iss_pc       (ex_iss_pc),
    .iss_req      (ex_iss_req),
    .iss_grant    (ex_iss_grant),
    .iss_pred_crit(ex_iss_pred_crit),
    .iss_class    (ex_iss_class),
    .fast_res     (ex_fast_res),
    .slow_res     (ex_slow_res),
    .upd_valid    (ex_upd_valid),
    .upd_pc       (ex_upd_pc),
    .upd_crit     (ex_upd_crit),
    .cpp_init_busy(ex_cpp_init_busy)
  );

  contrail_vscheduler #(
    .N_VCTX    (N_VCTX),
    .FIFO_DEPTH(FIFO_DEPTH)
  ) u_contrail (
    .clk             (clk),
    .rst_n           (rst_n),
    .spawn_valid     (ct_spawn_valid),
    .spawn_ready     (ct_spawn_ready),
    .spawn_start_pc  (ct_spawn_start_pc),
    .spawn_resume_pc (ct_spawn_resume_pc),
    .spawn_seq       (ct_spawn_seq),
    .ctx_start       (ct_ctx_start),
    .ctx_thread      (ct_ctx_thread),
    .ctx_busy        (ct_ctx_busy),
    .ctx_done        (ct_ctx_done),
    .ctx_mispredict  (ct_ctx_mispredict),
    .ctx_abort       (ct_ctx_abort),
    .squash_valid    (ct_squash_valid),
    .squash_seq      (ct_squash_seq),
    .squash_resume_pc(ct_squash_resume_pc),
    .squash_ctx      (ct_squash_ctx),
    .retire_valid    (ct_retire_valid),
    .retire_seq      (ct_retire_seq),
    .all_verified    (ct_all_verified),
    .queued          (ct_queued)
  );

endmodule
