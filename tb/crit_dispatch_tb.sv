// crit_dispatch_tb: random request and readiness patterns (8 issue slots,
// 3 fast and 3 slow units) against a reference model of the steering rule
// kept as queues of free units. Checks per slot the grant, class and unit,
// and per unit the select and source slot. Counts how often each of the four
// dispatch classes and a stall (valid slot without grant) occurred, and
// fails if any never happened.
module crit_dispatch_tb;
  import fu_pkg::*;
  localparam int IW = 8, NF = 3, NS = 3;

  logic [IW-1:0] cand_valid, cand_crit, cand_grant;
  logic [NF-1:0] fast_ready, fast_sel;
  logic [NS-1:0] slow_ready, slow_sel;
  disp_class_e [IW-1:0] cand_class;
  logic [IW-1:0][1:0] cand_unit;
  logic [NF-1:0][3:0] fast_slot;
  logic [NS-1:0][3:0] slow_slot;
  int checks = 0, failures = 0;
  int n_class [4];
  int n_stall = 0;

  crit_dispatch dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fq[$], sq[$];
    logic exp_g; int exp_u; logic exp_fast;
    logic [NF-1:0] e_fsel; logic [NS-1:0] e_ssel;
    int e_fslot [NF]; int e_sslot [NS];
    foreach (n_class[k]) n_class[k] = 0;
    for (int n = 0; n < 20000; n++) begin
      cand_valid = IW'($urandom);
      cand_crit  = IW'($urandom);
      fast_ready = NF'($urandom);
      slow_ready = NS'($urandom);
      #1;
      fq.delete(); sq.delete();
      for (int f = 0; f < NF; f++) if (fast_ready[f]) fq.push_back(f);
      for (int s = 0; s < NS; s++) if (slow_ready[s]) sq.push_back(s);
      e_fsel = '0; e_ssel = '0;
      for (int i = 0; i < IW; i++) begin
        exp_g = 0; exp_u = 0; exp_fast = 0;
        if (cand_valid[i]) begin
          if (cand_crit[i] && fq.size() > 0)      begin exp_g = 1; exp_fast = 1; exp_u = fq.pop_front(); end
          else if (sq.size() > 0)                 begin exp_g = 1; exp_fast = 0; exp_u = sq.pop_front(); end
          else if (fq.size() > 0)                 begin exp_g = 1; exp_fast = 1; exp_u = fq.pop_front(); end
        end
        if (exp_g && exp_fast)  begin e_fsel[exp_u] = 1; e_fslot[exp_u] = i; end
        if (exp_g && !exp_fast) begin e_ssel[exp_u] = 1; e_sslot[exp_u] = i; end
        checks++;
        if (cand_grant[i] !== exp_g) begin
          failures++; $display("slot %0d grant %b expected %b", i, cand_grant[i], exp_g);
        end else if (exp_g) begin
          disp_class_e ec;
          ec = exp_fast ? (cand_crit[i] ? CL_CF : CL_NF) : (cand_crit[i] ? CL_CS : CL_NS);
          checks++;
          if (cand_class[i] !== ec || int'(cand_unit[i]) != exp_u) begin
            failures++; $display("slot %0d class %s unit %0d, expected %s %0d", i,
                                 cand_class[i].name(), cand_unit[i], ec.name(), exp_u);
          end
          n_class[int'(ec)]++;
        end else if (cand_valid[i]) n_stall++;
      end
      checks++;
      if (fast_sel !== e_fsel || slow_sel !== e_ssel) begin
        failures++; $display("unit selects %b/%b expected %b/%b", fast_sel, slow_sel, e_fsel, e_ssel);
      end
      for (int f = 0; f < NF; f++) if (e_fsel[f]) begin
        checks++; if (int'(fast_slot[f]) != e_fslot[f]) begin failures++; $display("fast %0d slot", f); end
      end
      for (int s = 0; s < NS; s++) if (e_ssel[s]) begin
        checks++; if (int'(slow_slot[s]) != e_sslot[s]) begin failures++; $display("slow %0d slot", s); end
      end
    end
    $display("classes NS=%0d CS=%0d NF=%0d CF=%0d stalls=%0d", n_class[0], n_class[1], n_class[2], n_class[3], n_stall);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_class[k] == 0) begin failures++; $display("class %0d never occurred", k); end
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("no stall occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
