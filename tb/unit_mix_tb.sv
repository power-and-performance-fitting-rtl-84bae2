// unit_mix_tb: the functional-unit mixes compared for criticality-based
// scheduling, each with pipelined and with non-pipelined slow units:
// 1 fast/5 slow, 2 fast/4 slow and 3 fast/3 slow (the main configuration),
// on the same kind of random instruction stream. Every bench checks its
// cluster cycle by cycle; the summary lines show how the dispatch classes
// shift: fewer fast units raise the share of critical instructions on slow
// units (CS), and non-pipelined slow units push non-critical instructions
// onto fast units (NF).
module unit_mix_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   c [6], f [6];
  logic d [6];

  cluster_mix_bench #(.N_FAST(1), .N_SLOW(5), .PIPELINED(1'b1)) b0 (.clk, .checks(c[0]), .failures(f[0]), .finished(d[0]));
  cluster_mix_bench #(.N_FAST(2), .N_SLOW(4), .PIPELINED(1'b1)) b1 (.clk, .checks(c[1]), .failures(f[1]), .finished(d[1]));
  cluster_mix_bench #(.N_FAST(3), .N_SLOW(3), .PIPELINED(1'b1)) b2 (.clk, .checks(c[2]), .failures(f[2]), .finished(d[2]));
  cluster_mix_bench #(.N_FAST(1), .N_SLOW(5), .PIPELINED(1'b0)) b3 (.clk, .checks(c[3]), .failures(f[3]), .finished(d[3]));
  cluster_mix_bench #(.N_FAST(2), .N_SLOW(4), .PIPELINED(1'b0)) b4 (.clk, .checks(c[4]), .failures(f[4]), .finished(d[4]));
  cluster_mix_bench #(.N_FAST(3), .N_SLOW(3), .PIPELINED(1'b0)) b5 (.clk, .checks(c[5]), .failures(f[5]), .finished(d[5]));

  function automatic int total(int a [6]);
    int t = 0;
    foreach (a[k]) t += a[k];
    return t;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f));
    $finish;
  end
endmodule
