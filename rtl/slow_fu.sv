// slow_fu: slow, low-supply-voltage integer functional unit.
//
// The slow unit runs at half the supply voltage and half the clock rate of a
// fast unit, so each operation takes two cycles of the core clock. That half
// rate is modelled here on the core clock as a two-cycle latency; the
// voltage itself is a physical property and has no logic.
//
//   PIPELINED = 1: two stages, a new operation every cycle (same throughput
//                  as a fast unit). Stage 1 evaluates the operation, stage 2
//                  holds it for the second half-rate cycle.
//   PIPELINED = 0: a single stage that is busy for two cycles per operation,
//                  so in_ready drops for the cycle after an accept and the
//                  throughput is one operation per two cycles.
// Timing: an operation presented in cycle c (in_valid && in_ready) is on res
// for the whole of cycle c+2, for one cycle; a fast unit would show it in
// cycle c+1.
// Latency and both variants follow the source; the split of work between
// the two pipeline stages is this design's own choice.
module slow_fu
  import fu_pkg::*;
#(
  parameter bit PIPELINED = 1'b1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  fu_req_t in_req,
  output logic    in_ready,
  output fu_res_t res
);

  fu_res_t s1_q;     // operation in its first half-rate cycle
  logic    accept;

  assign accept = in_valid && in_ready;

  if (PIPELINED) begin : g_pipe
    assign in_ready = 1'b1;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s1_q <= '0;
        res  <= '0;
      end else begin
        s1_q.valid <= accept;
        s1_q.tag   <= in_req.tag;
        s1_q.value <= alu_compute(in_req.op, in_req.a, in_req.b);
        res        <= s1_q;
      end
    end
  end else begin : g_nopipe
    // s1_q.valid doubles as the busy flag of the single stage.
    assign in_ready = !s1_q.valid;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s1_q <= '0;
        res  <= '0;
      end else begin
        res.valid <= s1_q.valid;
        res.tag   <= s1_q.tag;
        res.value <= s1_q.value;
        if (accept) begin
          s1_q.valid <= 1'b1;
          s1_q.tag   <= in_req.tag;
          s1_q.value <= alu_compute(in_req.op, in_req.a, in_req.b);
        end else begin
          s1_q.valid <= 1'b0;
        end
      end
    end
  end

endmodule
