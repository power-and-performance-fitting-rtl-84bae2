// crit_exec_cluster_tb: the execution cluster with non-pipelined slow units
// and a 256-entry CPP buffer (short clearing walk), driven and checked by
// cluster_stream_driver. The pipelined variant at full size is exercised by
// the end-to-end test of the top level.
module crit_exec_cluster_tb;
  import fu_pkg::*;
  localparam int ENTRIES = 256;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic [7:0] iss_valid, iss_grant, iss_pred_crit, upd_valid, upd_crit;
  logic [7:0][31:0] iss_pc, upd_pc;
  fu_req_t [7:0] iss_req;
  disp_class_e [7:0] iss_class;
  fu_res_t [2:0] fast_res, slow_res;
  logic cpp_init_busy;
  int checks, failures;
  logic finished;

  crit_exec_cluster #(.PIPELINED(1'b0), .CPP_ENTRIES(ENTRIES)) dut (.*);
  cluster_stream_driver #(.ENTRIES(ENTRIES), .PIPELINED(1'b0), .CYCLES(4000)) drv (.*);

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
