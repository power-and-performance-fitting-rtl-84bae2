// power_fit_top_tb: end-to-end test of the top level with every parameter at
// its default (4K-entry CPP buffer, 3 fast and 3 pipelined slow units,
// 8-wide issue and commit, two verification contexts with a 4-deep queue).
// The execution cluster runs a clearing walk of the full table and then
// several thousand cycles of a mixed critical/non-critical instruction
// stream (cluster_stream_driver); the Contrail scheduler runs 20000 cycles of
// spawns, verifications, mispredictions and squashes at the same time
// (contrail_stream_driver). Both drivers check every cycle and require each
// mechanism to occur: the four dispatch classes, stalls, critical
// predictions, the clearing walk; queueing, back-pressure, squash, abort,
// flush, retirement and idle.
module power_fit_top_tb;
  import fu_pkg::*;
  import contrail_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, ct_rst_unused;
  logic [7:0] iss_valid, iss_grant, iss_pred_crit, upd_valid, upd_crit;
  logic [7:0][31:0] iss_pc, upd_pc;
  fu_req_t [7:0] iss_req;
  disp_class_e [7:0] iss_class;
  fu_res_t [2:0] fast_res, slow_res;
  logic cpp_init_busy;
  int ex_checks, ex_failures;
  logic ex_fin;

  logic spawn_valid, spawn_ready, squash_valid, retire_valid, all_verified;
  logic [PC_W-1:0] spawn_start_pc, spawn_resume_pc, squash_resume_pc;
  logic [SEQ_W-1:0] spawn_seq, squash_seq, retire_seq;
  logic [1:0] ctx_start, ctx_busy, ctx_done, ctx_mispredict, ctx_abort, squash_ctx;
  vthread_t [1:0] ctx_thread;
  logic [2:0] queued;
  int ct_checks, ct_failures;
  logic ct_fin;

  power_fit_top dut (
    .clk, .rst_n,
    .ex_iss_valid(iss_valid), .ex_iss_pc(iss_pc), .ex_iss_req(iss_req),
    .ex_iss_grant(iss_grant), .ex_iss_pred_crit(iss_pred_crit), .ex_iss_class(iss_class),
    .ex_fast_res(fast_res), .ex_slow_res(slow_res),
    .ex_upd_valid(upd_valid), .ex_upd_pc(upd_pc), .ex_upd_crit(upd_crit),
    .ex_cpp_init_busy(cpp_init_busy),
    .ct_spawn_valid(spawn_valid), .ct_spawn_ready(spawn_ready),
    .ct_spawn_start_pc(spawn_start_pc), .ct_spawn_resume_pc(spawn_resume_pc),
    .ct_spawn_seq(spawn_seq), .ct_ctx_start(ctx_start), .ct_ctx_thread(ctx_thread),
    .ct_ctx_busy(ctx_busy), .ct_ctx_done(ctx_done), .ct_ctx_mispredict(ctx_mispredict),
    .ct_ctx_abort(ctx_abort), .ct_squash_valid(squash_valid), .ct_squash_seq(squash_seq),
    .ct_squash_resume_pc(squash_resume_pc), .ct_squash_ctx(squash_ctx),
    .ct_retire_valid(retire_valid), .ct_retire_seq(retire_seq),
    .ct_all_verified(all_verified), .ct_queued(queued));

  cluster_stream_driver #(.ENTRIES(4096), .PIPELINED(1'b1), .CYCLES(6000)) drv_ex (
    .clk, .rst_n, .iss_valid, .iss_pc, .iss_req, .iss_grant, .iss_pred_crit, .iss_class,
    .fast_res, .slow_res, .upd_valid, .upd_pc, .upd_crit, .cpp_init_busy,
    .checks(ex_checks), .failures(ex_failures), .finished(ex_fin));

  // same reset timing as drv_ex, whose reset drives the design
  contrail_stream_driver #(.N_VCTX(2), .FIFO_DEPTH(4), .CYCLES(20000)) drv_ct (
    .clk, .rst_n(ct_rst_unused), .spawn_valid, .spawn_ready, .spawn_start_pc, .spawn_resume_pc,
    .spawn_seq, .ctx_start, .ctx_thread, .ctx_busy, .ctx_done, .ctx_mispredict, .ctx_abort,
    .squash_valid, .squash_seq, .squash_resume_pc, .squash_ctx, .retire_valid, .retire_seq,
    .all_verified, .queued, .checks(ct_checks), .failures(ct_failures), .finished(ct_fin));

  initial begin
    repeat (60000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ex_checks + ct_checks, ex_failures + ct_failures + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (ex_fin && ct_fin);
    $display("TB_RESULT checks=%0d failures=%0d", ex_checks + ct_checks, ex_failures + ct_failures);
    $finish;
  end
endmodule
