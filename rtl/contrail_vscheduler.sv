// contrail_vscheduler: verification-thread scheduler of a Contrail processor.
//
// In a Contrail processor the speculation stream runs on a fast pipeline and
// skips regions whose results a trace-level value predictor supplies. Each
// skipped region becomes a verification thread that re-executes it on a
// slow, low-voltage verification pipeline (a "verification context"). This
// block is the bookkeeping between the two streams:
//   * spawn    the speculation stream hands over a thread; it gets the next
//              sequence number and waits in a FIFO queue;
//   * start    when a verification context is free, the oldest queued
//              thread starts on the lowest-numbered free context (at most
//              one start per cycle);
//   * verify   a context reports done, with mispredict set if the predicted
//              values were wrong;
//   * squash   on a misprediction the speculation stream is squashed at the
//              region's resume PC and restarts from the state the
//              verification context computed (squash_*, same cycle as the
//              done); every younger thread, queued or running, is discarded
//              (ctx_abort for running ones);
//   * retire   verified threads retire in program order, one per cycle;
//   * idle     all_verified is high when no thread is outstanding, which is
//              when a finished speculation stream may complete.
// With N_VCTX = 2 this is the three-context machine (one speculation and two
// verification contexts); with N_VCTX = 1 the two-context machine, where
// threads wait in the FIFO for the single verification context.
//
// Timing: a thread spawned in cycle c can start in cycle c+1. ctx_start is a
// one-cycle pulse with ctx_thread valid while ctx_busy is high.
// The FIFO queue, the context counts and squash-and-recover come from the
// source; in-order retirement, discarding younger threads, the queue depth
// and the one-start-per-cycle limit are this design's own.
// The two assertions at the end sample rst_n synchronously (disable iff)
// while the flops use it asynchronously; lint reports that mix, which is
// intended.
module contrail_vscheduler
  import contrail_pkg::*;
#(
  parameter int unsigned N_VCTX     = 2,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // from the speculation stream
  input  logic                   spawn_valid,
  output logic                   spawn_ready,
  input  logic [PC_W-1:0]        spawn_start_pc,
  input  logic [PC_W-1:0]        spawn_resume_pc,
  output logic [SEQ_W-1:0]       spawn_seq,
  // to and from the verification contexts
  output logic [N_VCTX-1:0]      ctx_start,
  output vthread_t [N_VCTX-1:0]  ctx_thread,
  output logic [N_VCTX-1:0]      ctx_busy,
  input  logic [N_VCTX-1:0]      ctx_done,
  input  logic [N_VCTX-1:0]      ctx_mispredict,
  output logic [N_VCTX-1:0]      ctx_abort,
  // to the speculation stream
  output logic                   squash_valid,
  output logic [SEQ_W-1:0]       squash_seq,
  output logic [PC_W-1:0]        squash_resume_pc,
  output logic [$clog2(N_VCTX+1)-1:0] squash_ctx,
  output logic                   retire_valid,
  output logic [SEQ_W-1:0]       retire_seq,
  output logic                   all_verified,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] queued
);

  localparam int unsigned MAX_OUT = 1 << SEQ_W;
  localparam int unsigned CTX_W   = $clog2(N_VCTX + 1);

  typedef logic [SEQ_W:0] ptr_t;   // sequence number plus a wrap bit

  ptr_t                  head_q, tail_q;
  logic [MAX_OUT-1:0]    done_q;
  logic [N_VCTX-1:0]     busy_q;
  vthread_t [N_VCTX-1:0] thr_q;

  vthread_t              q_head, q_in;
  logic                  q_empty, q_full, q_push, q_pop;
  logic [$clog2(FIFO_DEPTH+1)-1:0] q_count;

  logic [SEQ_W:0]        outstanding;
  logic                  have_free;
  logic [CTX_W-1:0]      free_idx;
  logic                  mp_found;
  logic [CTX_W-1:0]      mp_ctx;
  logic [SEQ_W-1:0]      mp_age;

  function automatic logic [SEQ_W-1:0] age_of(logic [SEQ_W-1:0] seq,
                                               logic [SEQ_W-1:0] head);
    return seq - head;
  endfunction

  assign outstanding  = tail_q - head_q;
  assign all_verified = (outstanding == 0);
  assign queued       = q_count;
  assign ctx_busy     = busy_q;
  assign ctx_thread   = thr_q;

  // Oldest mispredicting context this cycle, and the first free context.
  always_comb begin
    mp_found = 1'b0;
    mp_ctx   = '0;
    mp_age   = '1;
    for (int c = 0; c < N_VCTX; c++) begin
      if (busy_q[c] && ctx_done[c] && ctx_mispredict[c] &&
          (!mp_found || age_of(thr_q[c].seq, head_q[SEQ_W-1:0]) < mp_age)) begin
        mp_found = 1'b1;
        mp_ctx   = CTX_W'(c);
        mp_age   = age_of(thr_q[c].seq, head_q[SEQ_W-1:0]);
      end
    end
    have_free = 1'b0;
    free_idx  = '0;
    for (int c = N_VCTX - 1; c >= 0; c--) begin
      if (!busy_q[c]) begin
        have_free = 1'b1;
        free_idx  = CTX_W'(c);
      end
    end
  end

  assign squash_valid     = mp_found;
  assign squash_ctx       = mp_ctx;
  assign squash_seq       = thr_q[mp_ctx].seq;
  assign squash_resume_pc = thr_q[mp_ctx].resume_pc;

  assign spawn_ready  = !q_full && (int'(outstanding) < MAX_OUT) && !mp_found;
  assign spawn_seq    = tail_q[SEQ_W-1:0];
  assign q_push       = spawn_valid && spawn_ready;
  assign q_in         = '{seq: tail_q[SEQ_W-1:0], start_pc: spawn_start_pc,
                          resume_pc: spawn_resume_pc};
  assign q_pop        = !q_empty && have_free && !mp_found;

  assign retire_valid = (outstanding != 0) && done_q[head_q[SEQ_W-1:0]];
  assign retire_seq   = head_q[SEQ_W-1:0];

  always_comb begin
    ctx_start = '0;
    for (int c = 0; c < N_VCTX; c++) begin
      if (q_pop && free_idx == CTX_W'(c)) ctx_start[c] = 1'b1;
    end
    ctx_abort = '0;
    if (mp_found) begin
      for (int c = 0; c < N_VCTX; c++) begin
        if (busy_q[c] && age_of(thr_q[c].seq, head_q[SEQ_W-1:0]) > mp_age)
          ctx_abort[c] = 1'b1;
      end
    end
  end

  sync_fifo #(
    .DEPTH(FIFO_DEPTH),
    .WIDTH($bits(vthread_t))
  ) u_queue (
    .clk    (clk),
    .rst_n  (rst_n),
    .flush  (mp_found),
    .push   (q_push),
    .wr_data(q_in),
    .pop    (q_pop),
    .rd_data(q_head),
    .empty  (q_empty),
    .full   (q_full),
    .count  (q_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= '0;
      done_q <= '0;
      busy_q <= '0;
      thr_q  <= '0;
    end else begin
      if (retire_valid) begin
        head_q                   <= head_q + 1'b1;
        done_q[head_q[SEQ_W-1:0]] <= 1'b0;
      end
      if (q_push) tail_q <= tail_q + 1'b1;
      for (int c = 0; c < N_VCTX; c++) begin
        if (busy_q[c] && ctx_done[c] && !ctx_abort[c]) begin
          busy_q[c]           <= 1'b0;
          done_q[thr_q[c].seq] <= 1'b1;
        end
      end
      if (mp_found) begin
        tail_q <= head_q + ptr_t'(mp_age) + 1'b1;
        for (int c = 0; c < N_VCTX; c++) begin
          if (ctx_abort[c]) busy_q[c] <= 1'b0;
        end
        for (int s = 0; s < MAX_OUT; s++) begin
          if (age_of(SEQ_W'(s), head_q[SEQ_W-1:0]) > mp_age) done_q[s] <= 1'b0;
        end
      end
      for (int c = 0; c < N_VCTX; c++) begin
        if (ctx_start[c]) begin
          busy_q[c] <= 1'b1;
          thr_q[c]  <= q_head;
        end
      end
    end
  end

  // A thread cannot finish on a context that is not running one.
  assert property (@(posedge clk) disable iff (!rst_n) ((ctx_done & ~busy_q) == '0))
    else $error("ctx_done on an idle verification context");
  // Outstanding threads never exceed what the sequence numbers can name.
  assert property (@(posedge clk) disable iff (!rst_n) int'(outstanding) <= MAX_OUT)
    else $error("verification thread count overflow");

endmodule
