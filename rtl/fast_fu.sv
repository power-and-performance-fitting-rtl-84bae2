// fast_fu: fast, full-supply-voltage integer functional unit.
//
// Executes one integer operation per cycle with a latency of one cycle: an
// operation presented in cycle c (in_valid high) is on res during cycle
// c+1, for exactly one cycle, with the tag it came with. It is always
// ready. Critical instructions are steered here. The one-cycle latency and
// full throughput follow the evaluated machine's integer ALU; the operation
// set (fu_pkg::alu_op_e) is this design's own.
module fast_fu
  import fu_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  fu_req_t in_req,
  output logic    in_ready,
  output fu_res_t res
);

  assign in_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res <= '0;
    end else begin
      res.valid <= in_valid;
      res.tag   <= in_req.tag;
      res.value <= alu_compute(in_req.op, in_req.a, in_req.b);
    end
  end

endmodule
