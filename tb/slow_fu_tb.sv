// slow_fu_tb: checks both slow-unit variants. Random operations are offered
// with random gaps; an operation is issued when in_ready is high. Every
// result must appear exactly two cycles after issue with the right value and
// tag. The pipelined unit must always be ready; the non-pipelined one must
// refuse an operation in the cycle after it accepted one, and accept again
// the cycle after that.
module slow_fu_tb;
  import fu_pkg::*;
  import alu_ref_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n;
  int      checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic    v_p, v_n, r_p, r_n;
  fu_req_t q_p, q_n;
  fu_res_t res_p, res_n;

  slow_fu #(.PIPELINED(1'b1)) dut_p (.clk, .rst_n, .in_valid(v_p), .in_req(q_p), .in_ready(r_p), .res(res_p));
  slow_fu #(.PIPELINED(1'b0)) dut_n (.clk, .rst_n, .in_valid(v_n), .in_req(q_n), .in_ready(r_n), .res(res_n));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, indexed by cycle of issue
  fu_req_t hist_p [$], hist_n [$];
  logic    hv_p [$], hv_n [$];
  int      n_busy_seen = 0, n_issued_n = 0, n_issued_p = 0;

  task automatic check_res(string nm, fu_res_t r, logic ev, fu_req_t eq);
    checks++;
    if (r.valid !== ev) begin
      failures++;
      $display("%s: valid %b expected %b", nm, r.valid, ev);
    end else if (ev) begin
      checks++;
      if (r.tag !== eq.tag || r.value !== ref_alu(eq.op, eq.a, eq.b)) begin
        failures++;
        $display("%s: op %s got %h expected %h", nm, eq.op.name(), r.value, ref_alu(eq.op, eq.a, eq.b));
      end
    end
  endtask

  logic prev_acc_n;

  initial begin
    rst_n = 1'b0; v_p = 0; v_n = 0; q_p = '0; q_n = '0; prev_acc_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // two idle cycles of history
    repeat (2) begin hv_p.push_back(0); hist_p.push_back('0); hv_n.push_back(0); hist_n.push_back('0); end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // results now visible belong to the operation issued two cycles ago
      check_res("pipelined", res_p, hv_p[0], hist_p[0]);
      check_res("non-pipelined", res_n, hv_n[0], hist_n[0]);
      void'(hv_p.pop_front()); void'(hist_p.pop_front());
      void'(hv_n.pop_front()); void'(hist_n.pop_front());
      // readiness rules
      checks++;
      if (r_p !== 1'b1) begin failures++; $display("pipelined unit not ready"); end
      checks++;
      if (r_n !== !prev_acc_n) begin
        failures++;
        $display("non-pipelined ready %b after accept=%b", r_n, prev_acc_n);
      end
      if (!r_n) n_busy_seen++;
      v_p = ($urandom_range(0, 4) != 0);
      v_n = ($urandom_range(0, 4) != 0);
      q_p = rand_req(6'(n));
      q_n = rand_req(6'(n + 7));
      hv_p.push_back(v_p && r_p);  hist_p.push_back(q_p);
      hv_n.push_back(v_n && r_n);  hist_n.push_back(q_n);
      prev_acc_n = v_n && r_n;
      if (v_n && r_n) n_issued_n++;
      if (v_p) n_issued_p++;
    end
    checks++;
    if (n_busy_seen == 0) begin failures++; $display("non-pipelined unit never busy"); end
    // throughput: the non-pipelined unit can take at most one per two cycles
    checks++;
    if (n_issued_n > 1500 || n_issued_p <= n_issued_n) begin
      failures++;
      $display("throughput: pipelined %0d non-pipelined %0d", n_issued_p, n_issued_n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
