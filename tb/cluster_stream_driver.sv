// cluster_stream_driver: instruction stream and checker for the
// criticality-steered execution cluster, connected to its ports.
//
// The stream draws PCs from a pool of 48 static instructions with a fixed
// criticality each: one third always critical, one third critical half of
// the time, one third never critical. This stands in for the criticality
// detector at commit. Each cycle up to 8 of the oldest pending instructions
// are presented; those not granted are presented again next cycle. Three
// cycles after dispatch each instruction trains the CPP buffer with its
// criticality, up to 8 per cycle.
// The unit counts are parameters so that other fast/slow mixes can be run.
// Checks: every prediction against a model of the counter table (including
// "not critical" while the table clears itself); every class against the
// prediction and the kind of unit; every result against an independent
// ALU model, on the right kind of unit, exactly one cycle (fast) or two
// cycles (slow) after dispatch; no lost and no extra results.
// Mechanisms counted, each must occur: the four dispatch classes, a stall,
// a critical prediction, the clearing walk; with non-pipelined slow units
// also a cycle in which a slow unit was busy with an earlier operation.
module cluster_stream_driver
  import fu_pkg::*;
  import alu_ref_pkg::*;
#(
  parameter int unsigned ENTRIES   = 4096,
  parameter bit          PIPELINED = 1'b1,
  parameter int unsigned CYCLES    = 3000,
  parameter int unsigned N_FAST    = 3,
  parameter int unsigned N_SLOW    = 3
) (
  input  logic                      clk,
  output logic                      rst_n,
  output logic [7:0]                iss_valid,
  output logic [7:0][31:0]          iss_pc,
  output fu_req_t [7:0]             iss_req,
  input  logic [7:0]                iss_grant,
  input  logic [7:0]                iss_pred_crit,
  input  disp_class_e [7:0]         iss_class,
  input  fu_res_t [N_FAST-1:0]      fast_res,
  input  fu_res_t [N_SLOW-1:0]      slow_res,
  output logic [7:0]                upd_valid,
  output logic [7:0][31:0]          upd_pc,
  output logic [7:0]                upd_crit,
  input  logic                      cpp_init_busy,
  output int                        checks,
  output int                        failures,
  output logic                      finished
);

  typedef struct {
    logic [31:0] pc;
    fu_req_t     req;
  } insn_t;
  typedef struct {
    logic [31:0] pc;
    logic        crit;
    int          when;
  } train_t;

  insn_t  pending [$];
  train_t trainq  [$];
  int     model   [ENTRIES];
  // per tag: expected value, kind of unit, due cycle
  bit          exp_live [64];
  logic [31:0] exp_val  [64];
  bit          exp_fast [64];
  int          exp_due  [64];
  int          cyc;
  int          n_class [4];
  int          n_stall, n_pcrit, n_init, n_slowbusy, n_results, n_dispatched;
  logic [5:0]  next_tag;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("cycle %0d: %s", cyc, msg);
    end
  endtask

  function automatic int idx(logic [31:0] pc);
    return int'((pc >> 2) % ENTRIES);
  endfunction

  function automatic logic oracle(logic [31:0] pc);
    int k = int'((pc - 32'h1000) >> 2);
    if (k % 3 == 0) return 1'b1;
    if (k % 3 == 1) return 1'($urandom_range(0, 1));
    return 1'b0;
  endfunction

  task automatic check_results();
    for (int u = 0; u < int'(N_FAST + N_SLOW); u++) begin
      fu_res_t r;
      bit      is_fast;
      is_fast = (u < int'(N_FAST));
      r = is_fast ? fast_res[u] : slow_res[u - int'(N_FAST)];
      if (r.valid) begin
        n_results++;
        chk(exp_live[r.tag], $sformatf("result for tag %0d not in flight", r.tag));
        if (exp_live[r.tag]) begin
          chk(exp_fast[r.tag] == is_fast, $sformatf("tag %0d on wrong kind of unit", r.tag));
          chk(exp_due[r.tag] == cyc, $sformatf("tag %0d latency: due %0d now %0d", r.tag, exp_due[r.tag], cyc));
          chk(r.value == exp_val[r.tag], $sformatf("tag %0d value %h expected %h", r.tag, r.value, exp_val[r.tag]));
          exp_live[r.tag] = 0;
        end
      end
    end
    foreach (exp_live[t]) if (exp_live[t] && exp_due[t] <= cyc) begin
      chk(0, $sformatf("tag %0d result missing", t));
      exp_live[t] = 0;
    end
  endtask

  initial begin : main
    int nf;
    logic init_now;
    checks = 0; failures = 0; finished = 0;
    cyc = 0; next_tag = '0;
    n_stall = 0; n_pcrit = 0; n_init = 0; n_slowbusy = 0; n_results = 0; n_dispatched = 0;
    foreach (n_class[k]) n_class[k] = 0;
    foreach (model[e]) model[e] = 0;
    foreach (exp_live[t]) exp_live[t] = 0;
    rst_n = 0; iss_valid = '0; iss_pc = '0; iss_req = '0;
    upd_valid = '0; upd_pc = '0; upd_crit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (cyc < int'(CYCLES) + int'(ENTRIES) || pending.size() > 0 || trainq.size() > 0) begin
      @(negedge clk);
      cyc++;
      check_results();
      // new instructions
      if (cyc < int'(CYCLES) + int'(ENTRIES) && pending.size() < 16) begin
        nf = $urandom_range(0, 8);
        for (int k = 0; k < nf; k++) begin
          insn_t in;
          in.pc  = 32'h1000 + 32'(4 * $urandom_range(0, 47));
          in.req = rand_req(next_tag);
          next_tag++;
          pending.push_back(in);
        end
      end
      iss_valid = '0;
      for (int i = 0; i < 8; i++) begin
        if (i < pending.size()) begin
          iss_valid[i] = 1'b1;
          iss_pc[i]    = pending[i].pc;
          iss_req[i]   = pending[i].req;
        end else begin
          iss_pc[i]  = 32'h1000;
          iss_req[i] = '0;
        end
      end
      upd_valid = '0;
      for (int j = 0; j < 8; j++) begin
        if (trainq.size() > 0 && trainq[0].when <= cyc) begin
          train_t t;
          t = trainq.pop_front();
          upd_valid[j] = 1'b1;
          upd_pc[j]    = t.pc;
          upd_crit[j]  = t.crit;
        end
      end
      #1;
      init_now = cpp_init_busy;
      if (init_now) n_init++;
      // predictions and classes
      begin
        int taken;
        taken = 0;
        for (int i = 0; i < 8; i++) begin
          if (iss_valid[i]) begin
            bit ep;
            ep = !init_now && model[idx(iss_pc[i])] > 8;
            chk(iss_pred_crit[i] == ep, $sformatf("slot %0d pc %h prediction %b expected %b",
                                                   i, iss_pc[i], iss_pred_crit[i], ep));
            if (ep) n_pcrit++;
            if (iss_grant[i]) begin
              bit fast;
              logic [5:0] tg;
              fast = (iss_class[i] == CL_CF || iss_class[i] == CL_NF);
              chk((iss_class[i] == CL_CF || iss_class[i] == CL_CS) == iss_pred_crit[i],
                  $sformatf("slot %0d class %s with prediction %b", i, iss_class[i].name(), iss_pred_crit[i]));
              n_class[int'(iss_class[i])]++;
              tg = iss_req[i].tag;
              chk(!exp_live[tg], "tag reused while in flight");
              exp_live[tg] = 1;
              exp_fast[tg] = fast;
              exp_due[tg]  = cyc + (fast ? 1 : 2);
              exp_val[tg]  = ref_alu(iss_req[i].op, iss_req[i].a, iss_req[i].b);
              begin
                train_t t;
                t.pc = iss_pc[i]; t.crit = oracle(iss_pc[i]); t.when = cyc + 3;
                trainq.push_back(t);
              end
              n_dispatched++;
              taken++;
            end else begin
              n_stall++;
            end
          end
        end
        // granted slots leave the pending list; the rest are offered again
        for (int i = 7; i >= 0; i--) if (iss_valid[i] && iss_grant[i]) pending.delete(i);
        // a slot left waiting while some unit took nothing: a slow unit was
        // still busy with its previous operation
        if (!PIPELINED && taken < int'(N_FAST + N_SLOW) && (iss_valid & ~iss_grant) != '0) n_slowbusy++;
      end
      // counter model follows the updates of this cycle
      if (!init_now) begin
        for (int j = 0; j < 8; j++) begin
          if (upd_valid[j]) begin
            int e;
            e = idx(upd_pc[j]);
            if (upd_crit[j]) model[e] = (model[e] + 8 > 63) ? 63 : model[e] + 8;
            else             model[e] = (model[e] == 0) ? 0 : model[e] - 1;
          end
        end
      end
    end
    repeat (3) begin @(negedge clk); cyc++; check_results(); end
    chk(n_results == n_dispatched, $sformatf("%0d results for %0d dispatched", n_results, n_dispatched));
    $display("%0dfast/%0dslow %s: dispatched=%0d NS=%0d CS=%0d NF=%0d CF=%0d stalls=%0d critical-predictions=%0d init-cycles=%0d slow-busy=%0d",
             N_FAST, N_SLOW, PIPELINED ? "pipelined" : "non-pipelined", n_dispatched, n_class[0], n_class[1], n_class[2], n_class[3], n_stall, n_pcrit, n_init, n_slowbusy);
    for (int k = 0; k < 4; k++) chk(n_class[k] > 0, $sformatf("class %0d never occurred", k));
    chk(n_stall > 0, "no stall");
    chk(n_pcrit > 0, "no critical prediction");
    // the first clearing cycle falls before the first sampled cycle
    chk(n_init == int'(ENTRIES) - 1, $sformatf("clearing lasted %0d sampled cycles", n_init));
    if (!PIPELINED) chk(n_slowbusy > 0, "slow units never busy");
    finished = 1;
  end
endmodule
