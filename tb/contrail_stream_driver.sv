// contrail_stream_driver: drives one contrail_vscheduler, through its ports, with a random
// speculation stream and behavioural verification contexts, and checks it
// cycle by cycle against a reference model of the outstanding threads kept
// in program order.
//
// The contexts are simple models: a started thread runs for a random 1 to
// 12 cycles, then reports done, with a misprediction about one time in
// seven. The reference model expects: new threads numbered in order; the
// oldest queued thread started on the lowest free context; on a
// misprediction, a squash naming the oldest mispredicting thread with its
// resume PC, aborts of every running younger thread and a restart of the
// numbering right after it; in-order retirement of verified threads; spawn
// back-pressure when the queue or the sequence space is full.
// Mechanisms counted (each must occur): spawn, start, wait in queue,
// back-pressure, squash, abort of a running thread, flush of queued threads,
// retirement, idle (all verified).
module contrail_stream_driver
  import contrail_pkg::*;
#(
  parameter int unsigned N_VCTX     = 2,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned CYCLES     = 20000
) (
  input  logic                      clk,
  output logic                      rst_n,
  output logic                      spawn_valid,
  input  logic                      spawn_ready,
  output logic [PC_W-1:0]           spawn_start_pc,
  output logic [PC_W-1:0]           spawn_resume_pc,
  input  logic [SEQ_W-1:0]          spawn_seq,
  input  logic [N_VCTX-1:0]         ctx_start,
  input  vthread_t [N_VCTX-1:0]     ctx_thread,
  input  logic [N_VCTX-1:0]         ctx_busy,
  output logic [N_VCTX-1:0]         ctx_done,
  output logic [N_VCTX-1:0]         ctx_mispredict,
  input  logic [N_VCTX-1:0]         ctx_abort,
  input  logic                      squash_valid,
  input  logic [SEQ_W-1:0]          squash_seq,
  input  logic [PC_W-1:0]           squash_resume_pc,
  input  logic [$clog2(N_VCTX+1)-1:0] squash_ctx,
  input  logic                      retire_valid,
  input  logic [SEQ_W-1:0]          retire_seq,
  input  logic                      all_verified,
  input  logic [$clog2(FIFO_DEPTH+1)-1:0] queued,
  output int                        checks,
  output int                        failures,
  output logic                      finished
);

  typedef enum {T_Q, T_R, T_D} tstate_e;
  typedef struct {
    int seq; logic [PC_W-1:0] spc, rpc; tstate_e st; int ctx;
  } thr_t;

  thr_t out[$];
  int   next_seq;
  bit   m_busy [N_VCTX];
  int   m_timer [N_VCTX];
  int   m_pos_of_ctx;
  int   cnt_spawn, cnt_start, cnt_wait, cnt_bp, cnt_squash, cnt_abort, cnt_flush, cnt_retire, cnt_idle;

  function automatic int pos_of_seq(int s);
    foreach (out[k]) if (out[k].seq == s) return k;
    return -1;
  endfunction

  function automatic int n_queued();
    int q = 0;
    foreach (out[k]) if (out[k].st == T_Q) q++;
    return q;
  endfunction

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[N_VCTX=%0d] %0t: %s", N_VCTX, $time, msg);
    end
  endtask

  initial begin : main
    int mp_pos, mp_c, start_c, first_q;
    bit exp_ready, exp_retire;
    checks = 0; failures = 0; finished = 0;
    next_seq = 0;
    foreach (m_busy[c]) begin m_busy[c] = 0; m_timer[c] = 0; end
    cnt_spawn = 0; cnt_start = 0; cnt_wait = 0; cnt_bp = 0; cnt_squash = 0;
    cnt_abort = 0; cnt_flush = 0; cnt_retire = 0; cnt_idle = 0;
    rst_n = 0; spawn_valid = 0; spawn_start_pc = '0; spawn_resume_pc = '0;
    ctx_done = '0; ctx_mispredict = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < int'(CYCLES); n++) begin
      @(negedge clk);
      // drive inputs
      spawn_valid     = ($urandom_range(0, 99) < ((n / 2000) % 2 == 0 ? 60 : 15));
      spawn_start_pc  = {$urandom, 2'b00};
      spawn_resume_pc = spawn_start_pc + 32'(4 * $urandom_range(4, 64));
      ctx_done = '0; ctx_mispredict = '0;
      for (int c = 0; c < N_VCTX; c++) begin
        if (m_busy[c] && m_timer[c] == 0) begin
          ctx_done[c] = 1'b1;
          ctx_mispredict[c] = ($urandom_range(0, 6) == 0);
        end
      end
      #1;
      // expected combinational outputs
      mp_pos = -1; mp_c = -1;
      for (int c = 0; c < N_VCTX; c++) begin
        if (ctx_done[c] && ctx_mispredict[c]) begin
          int p;
          p = -1;
          foreach (out[k]) if (out[k].st == T_R && out[k].ctx == c) p = k;
          if (mp_pos < 0 || p < mp_pos) begin mp_pos = p; mp_c = c; end
        end
      end
      for (int c = 0; c < N_VCTX; c++) chk(ctx_busy[c] == m_busy[c], $sformatf("ctx %0d busy %b", c, ctx_busy[c]));
      chk(all_verified == (out.size() == 0), "all_verified");
      chk(int'(queued) == n_queued(), $sformatf("queued %0d expected %0d", queued, n_queued()));
      chk(squash_valid == (mp_pos >= 0), "squash_valid");
      if (mp_pos >= 0) begin
        chk(int'(squash_seq) == out[mp_pos].seq && squash_resume_pc == out[mp_pos].rpc &&
            int'(squash_ctx) == mp_c, "squash details");
        cnt_squash++;
      end
      for (int c = 0; c < N_VCTX; c++) begin
        bit ea;
        ea = 0;
        if (mp_pos >= 0) foreach (out[k]) if (k > mp_pos && out[k].st == T_R && out[k].ctx == c) ea = 1;
        chk(ctx_abort[c] == ea, $sformatf("ctx %0d abort %b expected %b", c, ctx_abort[c], ea));
        if (ea) cnt_abort++;
      end
      exp_ready = (mp_pos < 0) && n_queued() < int'(FIFO_DEPTH) && out.size() < (1 << SEQ_W);
      chk(spawn_ready == exp_ready, $sformatf("spawn_ready %b expected %b", spawn_ready, exp_ready));
      if (spawn_valid && !exp_ready) cnt_bp++;
      if (exp_ready) chk(int'(spawn_seq) == next_seq % (1 << SEQ_W), "spawn_seq");
      exp_retire = out.size() > 0 && out[0].st == T_D;
      chk(retire_valid == exp_retire, "retire_valid");
      if (exp_retire) chk(int'(retire_seq) == out[0].seq, "retire_seq");
      first_q = -1;
      foreach (out[k]) if (first_q < 0 && out[k].st == T_Q) first_q = k;
      start_c = -1;
      if (mp_pos < 0 && first_q >= 0)
        for (int c = N_VCTX - 1; c >= 0; c--) if (!m_busy[c]) start_c = c;
      for (int c = 0; c < N_VCTX; c++) chk(ctx_start[c] == (c == start_c), $sformatf("ctx %0d start", c));
      if (out.size() == 0) cnt_idle++;
      if (first_q >= 0 && start_c < 0 && mp_pos < 0) cnt_wait++;

      // model update, as the clock edge will do
      if (exp_retire) begin void'(out.pop_front()); cnt_retire++; if (mp_pos >= 0) mp_pos--; if (first_q >= 0) first_q--; end
      for (int c = 0; c < N_VCTX; c++) begin
        if (ctx_done[c] && !ctx_abort[c]) begin
          foreach (out[k]) if (out[k].st == T_R && out[k].ctx == c) out[k].st = T_D;
          m_busy[c] = 0;
        end
      end
      if (mp_pos >= 0) begin
        bit flushed;
        thr_t t;
        flushed = 0;
        while (out.size() > mp_pos + 1) begin
          t = out.pop_back();
          if (t.st == T_Q) flushed = 1;
          if (t.st == T_R) m_busy[t.ctx] = 0;
        end
        if (flushed) cnt_flush++;
        next_seq = out[mp_pos].seq + 1;
      end else if (start_c >= 0) begin
        out[first_q].st = T_R;
        out[first_q].ctx = start_c;
        m_busy[start_c] = 1;
        m_timer[start_c] = $urandom_range(1, 12);
        cnt_start++;
      end
      if (spawn_valid && exp_ready) begin
        thr_t t;
        t.seq = next_seq % (1 << SEQ_W); t.spc = spawn_start_pc; t.rpc = spawn_resume_pc; t.st = T_Q; t.ctx = -1;
        out.push_back(t);
        next_seq = (next_seq + 1) % (1 << SEQ_W);
        cnt_spawn++;
      end
      for (int c = 0; c < N_VCTX; c++) if (m_busy[c] && m_timer[c] > 0 && !(start_c == c)) m_timer[c]--;
      @(posedge clk);
      #1;
      // the started thread's descriptor is held on its context
      for (int c = 0; c < N_VCTX; c++) begin
        if (m_busy[c]) begin
          foreach (out[k]) if (out[k].st == T_R && out[k].ctx == c)
            chk(int'(ctx_thread[c].seq) == out[k].seq && ctx_thread[c].start_pc == out[k].spc &&
                ctx_thread[c].resume_pc == out[k].rpc, $sformatf("ctx %0d thread", c));
        end
      end
    end
    $display("[N_VCTX=%0d] spawn=%0d start=%0d wait=%0d backpressure=%0d squash=%0d abort=%0d flush=%0d retire=%0d idle=%0d",
             N_VCTX, cnt_spawn, cnt_start, cnt_wait, cnt_bp, cnt_squash, cnt_abort, cnt_flush, cnt_retire, cnt_idle);
    chk(cnt_spawn > 0, "no spawn");
    chk(cnt_start > 0, "no start");
    chk(cnt_wait > 0, "no thread waited in the queue");
    chk(cnt_bp > 0, "no back-pressure");
    chk(cnt_squash > 0, "no squash");
    chk(cnt_flush > 0, "no flush of queued threads");
    chk(cnt_retire > 0, "no retirement");
    chk(cnt_idle > 0, "never idle");
    if (N_VCTX > 1) chk(cnt_abort > 0, "no abort of a running thread");
    finished = 1;
  end
endmodule
