// cluster_mix_bench: one execution cluster with a given mix of fast and
// slow units, a 256-entry CPP buffer and its own clock-synchronous stream
// driver (cluster_stream_driver). Reports the driver's check counts and,
// through the driver's summary line, the share of each dispatch class.
module cluster_mix_bench
  import fu_pkg::*;
#(
  parameter int unsigned N_FAST    = 3,
  parameter int unsigned N_SLOW    = 3,
  parameter bit          PIPELINED = 1'b1
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int ENTRIES = 256;

  logic rst_n;
  logic [7:0] iss_valid, iss_grant, iss_pred_crit, upd_valid, upd_crit;
  logic [7:0][31:0] iss_pc, upd_pc;
  fu_req_t [7:0] iss_req;
  disp_class_e [7:0] iss_class;
  fu_res_t [N_FAST-1:0] fast_res;
  fu_res_t [N_SLOW-1:0] slow_res;
  logic cpp_init_busy;

  crit_exec_cluster #(.N_FAST(N_FAST), .N_SLOW(N_SLOW), .PIPELINED(PIPELINED),
                      .CPP_ENTRIES(ENTRIES)) dut (.*);
  cluster_stream_driver #(.ENTRIES(ENTRIES), .PIPELINED(PIPELINED), .CYCLES(3000),
                          .N_FAST(N_FAST), .N_SLOW(N_SLOW)) drv (.*);
endmodule
