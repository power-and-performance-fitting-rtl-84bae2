// dataflow_example_tb: the ten-instruction data flow graph used to explain
// criticality. With unit latencies, the chain I0-I2-I5-I6-I8-I9 sets the
// execution time; I1, I3, I4 and I7 have slack. The graph is run as a
// loop body on the execution cluster (64-entry CPP buffer), each iteration
// issued in dependence order (as soon as possible, unit latency):
//   cycle 1: I0 I1   cycle 2: I2 I3   cycle 3: I4 I5
//   cycle 4: I6      cycle 5: I7 I8   cycle 6: I9
// After each iteration every instruction trains the CPP buffer with its
// criticality in the graph. Checks: in the first two iterations nothing is
// predicted critical yet (one +8 step reaches the threshold but does not
// exceed it); from the third iteration on, the six chain instructions are
// predicted critical and run on fast units (CF) and the other four run on
// slow units (NS); every result is correct and arrives one cycle (fast) or
// two cycles (slow) after dispatch.
module dataflow_example_tb;
  import fu_pkg::*;
  import alu_ref_pkg::*;

  localparam logic [9:0] CRIT = 10'b11_0110_0101;  // I9 I8 I6 I5 I2 I0

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic [7:0] iss_valid, iss_grant, iss_pred_crit, upd_valid, upd_crit;
  logic [7:0][31:0] iss_pc, upd_pc;
  fu_req_t [7:0] iss_req;
  disp_class_e [7:0] iss_class;
  fu_res_t [2:0] fast_res, slow_res;
  logic cpp_init_busy;
  int checks = 0, failures = 0;

  crit_exec_cluster #(.CPP_ENTRIES(64)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // issue groups of the as-soon-as-possible schedule
  int group [6][2] = '{'{0, 1}, '{2, 3}, '{4, 5}, '{6, -1}, '{7, 8}, '{9, -1}};
  int n_cf, n_ns;

  initial begin
    logic [31:0] exp_v [8];
    bit          exp_f [8];
    rst_n = 0; iss_valid = '0; iss_pc = '0; iss_req = '0; upd_valid = '0; upd_pc = '0; upd_crit = '0;
    n_cf = 0; n_ns = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (!cpp_init_busy);
    for (int it = 0; it < 5; it++) begin
      for (int g = 0; g < 6; g++) begin
        @(negedge clk);
        iss_valid = '0;
        for (int k = 0; k < 2; k++) begin
          if (group[g][k] >= 0) begin
            iss_valid[k] = 1'b1;
            iss_pc[k]    = 32'h100 + 32'(4 * group[g][k]);
            iss_req[k]   = rand_req(6'(k));
          end
        end
        #1;
        for (int k = 0; k < 2; k++) begin
          if (iss_valid[k]) begin
            int  i;
            bit  ep;
            i  = group[g][k];
            ep = (it >= 2) && CRIT[i];
            checks++;
            if (!iss_grant[k] || iss_pred_crit[k] != ep) begin
              failures++;
              $display("iteration %0d I%0d: grant %b prediction %b expected %b", it, i, iss_grant[k], iss_pred_crit[k], ep);
            end
            if (it >= 2) begin
              checks++;
              if (iss_class[k] != (CRIT[i] ? CL_CF : CL_NS)) begin
                failures++;
                $display("iteration %0d I%0d: class %s", it, i, iss_class[k].name());
              end
            end
            if (iss_class[k] == CL_CF) n_cf++;
            if (iss_class[k] == CL_NS) n_ns++;
            exp_v[k] = ref_alu(iss_req[k].op, iss_req[k].a, iss_req[k].b);
            exp_f[k] = (iss_class[k] == CL_CF || iss_class[k] == CL_NF);
          end
        end
        // find each result on the right kind of unit, at the right time:
        // fast results one cycle after dispatch, slow results two cycles
        begin
          logic [1:0] was_valid;
          was_valid = iss_valid[1:0];
          for (int d = 1; d <= 2; d++) begin
            @(negedge clk);
            iss_valid = '0;
            for (int k = 0; k < 2; k++) begin
              if (was_valid[k] && (exp_f[k] ? 1 : 2) == d) begin
                bit found;
                found = 0;
                for (int u = 0; u < 3; u++) begin
                  fu_res_t r;
                  r = exp_f[k] ? fast_res[u] : slow_res[u];
                  if (r.valid && r.tag == 6'(k) && r.value == exp_v[k]) found = 1;
                end
                checks++;
                if (!found) begin
                  failures++;
                  $display("iteration %0d group %0d slot %0d: result not found", it, g, k);
                end
              end
            end
          end
        end
      end
      // train: each instruction reports its criticality in the graph
      @(negedge clk);
      for (int j = 0; j < 8; j++) begin
        upd_valid[j] = 1'b1;
        upd_pc[j]    = 32'h100 + 32'(4 * j);
        upd_crit[j]  = CRIT[j];
      end
      @(negedge clk);
      for (int j = 0; j < 2; j++) begin
        upd_valid[j] = 1'b1;
        upd_pc[j]    = 32'h100 + 32'(4 * (8 + j));
        upd_crit[j]  = CRIT[8 + j];
      end
      upd_valid[7:2] = '0;
      @(negedge clk);
      upd_valid = '0;
    end
    checks++;
    if (n_cf != 18 || n_ns != 4 * 5 + 6 * 2) begin
      failures++;
      $display("CF %0d NS %0d, expected 18 and 32", n_cf, n_ns);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
