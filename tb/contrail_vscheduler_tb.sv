// contrail_vscheduler_tb: runs the verification-thread scheduler in both
// machine sizes of the Contrail scheme: three contexts (one speculation, two
// verification) and two contexts (one of each, threads waiting in the FIFO).
// Each contrail_stream_driver checks its scheduler cycle by cycle against a
// reference model.
module contrail_vscheduler_tb;
  import contrail_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // three-context machine: two verification contexts
  logic a_rst_n, a_spawn_valid, a_spawn_ready, a_squash_valid, a_retire_valid, a_all_verified;
  logic [PC_W-1:0] a_spawn_start_pc, a_spawn_resume_pc, a_squash_resume_pc;
  logic [SEQ_W-1:0] a_spawn_seq, a_squash_seq, a_retire_seq;
  logic [1:0] a_ctx_start, a_ctx_busy, a_ctx_done, a_ctx_mispredict, a_ctx_abort, a_squash_ctx;
  vthread_t [1:0] a_ctx_thread;
  logic [2:0] a_queued;
  int a_checks, a_failures;
  logic a_fin;

  // two-context machine: one verification context
  logic b_rst_n, b_spawn_valid, b_spawn_ready, b_squash_valid, b_retire_valid, b_all_verified;
  logic [PC_W-1:0] b_spawn_start_pc, b_spawn_resume_pc, b_squash_resume_pc;
  logic [SEQ_W-1:0] b_spawn_seq, b_squash_seq, b_retire_seq;
  logic [0:0] b_ctx_start, b_ctx_busy, b_ctx_done, b_ctx_mispredict, b_ctx_abort, b_squash_ctx;
  vthread_t [0:0] b_ctx_thread;
  logic [2:0] b_queued;
  int b_checks, b_failures;
  logic b_fin;

  contrail_vscheduler #(.N_VCTX(2)) dut_a (
    .clk, .rst_n(a_rst_n), .spawn_valid(a_spawn_valid), .spawn_ready(a_spawn_ready),
    .spawn_start_pc(a_spawn_start_pc), .spawn_resume_pc(a_spawn_resume_pc), .spawn_seq(a_spawn_seq),
    .ctx_start(a_ctx_start), .ctx_thread(a_ctx_thread), .ctx_busy(a_ctx_busy), .ctx_done(a_ctx_done),
    .ctx_mispredict(a_ctx_mispredict), .ctx_abort(a_ctx_abort), .squash_valid(a_squash_valid),
    .squash_seq(a_squash_seq), .squash_resume_pc(a_squash_resume_pc), .squash_ctx(a_squash_ctx),
    .retire_valid(a_retire_valid), .retire_seq(a_retire_seq), .all_verified(a_all_verified),
    .queued(a_queued));
  contrail_stream_driver #(.N_VCTX(2)) drv_a (
    .clk, .rst_n(a_rst_n), .spawn_valid(a_spawn_valid), .spawn_ready(a_spawn_ready),
    .spawn_start_pc(a_spawn_start_pc), .spawn_resume_pc(a_spawn_resume_pc), .spawn_seq(a_spawn_seq),
    .ctx_start(a_ctx_start), .ctx_thread(a_ctx_thread), .ctx_busy(a_ctx_busy), .ctx_done(a_ctx_done),
    .ctx_mispredict(a_ctx_mispredict), .ctx_abort(a_ctx_abort), .squash_valid(a_squash_valid),
    .squash_seq(a_squash_seq), .squash_resume_pc(a_squash_resume_pc), .squash_ctx(a_squash_ctx),
    .retire_valid(a_retire_valid), .retire_seq(a_retire_seq), .all_verified(a_all_verified),
    .queued(a_queued), .checks(a_checks), .failures(a_failures), .finished(a_fin));

  contrail_vscheduler #(.N_VCTX(1)) dut_b (
    .clk, .rst_n(b_rst_n), .spawn_valid(b_spawn_valid), .spawn_ready(b_spawn_ready),
    .spawn_start_pc(b_spawn_start_pc), .spawn_resume_pc(b_spawn_resume_pc), .spawn_seq(b_spawn_seq),
    .ctx_start(b_ctx_start), .ctx_thread(b_ctx_thread), .ctx_busy(b_ctx_busy), .ctx_done(b_ctx_done),
    .ctx_mispredict(b_ctx_mispredict), .ctx_abort(b_ctx_abort), .squash_valid(b_squash_valid),
    .squash_seq(b_squash_seq), .squash_resume_pc(b_squash_resume_pc), .squash_ctx(b_squash_ctx),
    .retire_valid(b_retire_valid), .retire_seq(b_retire_seq), .all_verified(b_all_verified),
    .queued(b_queued));
  contrail_stream_driver #(.N_VCTX(1)) drv_b (
    .clk, .rst_n(b_rst_n), .spawn_valid(b_spawn_valid), .spawn_ready(b_spawn_ready),
    .spawn_start_pc(b_spawn_start_pc), .spawn_resume_pc(b_spawn_resume_pc), .spawn_seq(b_spawn_seq),
    .ctx_start(b_ctx_start), .ctx_thread(b_ctx_thread), .ctx_busy(b_ctx_busy), .ctx_done(b_ctx_done),
    .ctx_mispredict(b_ctx_mispredict), .ctx_abort(b_ctx_abort), .squash_valid(b_squash_valid),
    .squash_seq(b_squash_seq), .squash_resume_pc(b_squash_resume_pc), .squash_ctx(b_squash_ctx),
    .retire_valid(b_retire_valid), .retire_seq(b_retire_seq), .all_verified(b_all_verified),
    .queued(b_queued), .checks(b_checks), .failures(b_failures), .finished(b_fin));

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks, a_failures + b_failures + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (a_fin && b_fin);
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks, a_failures + b_failures);
    $finish;
  end
endmodule
