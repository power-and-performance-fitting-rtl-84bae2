// crit_dispatch: criticality-based steering of issuing instructions onto
// fast and slow functional units.
//
// Each cycle up to ISSUE_W instructions, in age order (slot 0 oldest), ask
// to be dispatched, each with its predicted-critical bit from the CPP
// buffer. Walking the slots oldest first:
//   predicted critical     -> the lowest-numbered free fast unit (class CF);
//                             if none is free, a free slow unit (class CS);
//   predicted non-critical -> the lowest-numbered free slow unit (class NS);
//                             if none is free, a free fast unit (class NF);
//   no free unit at all    -> not granted this cycle (the slot stalls).
// A unit is free when its in_ready is high and no older slot took it in
// this cycle. The logic is purely combinational.
//
// Interface: cand_valid/cand_crit per slot in; per slot a grant, the class
// and the unit index out; per unit a select with the slot index that feeds
// it.
// Steering critical work to fast and non-critical work to slow units is the
// source's scheme. The fallback to the other kind of unit is inferred from
// the source's four dispatch classes (critical instructions on slow units
// and non-critical ones on fast units both occur); the oldest-first order
// and lowest-index unit choice are this design's own.
module crit_dispatch
  import fu_pkg::*;
#(
  parameter int unsigned ISSUE_W = 8,
  parameter int unsigned N_FAST  = 3,
  parameter int unsigned N_SLOW  = 3,
  localparam int unsigned UIDX_W = $clog2((N_FAST > N_SLOW ? N_FAST : N_SLOW) + 1),
  localparam int unsigned SLOT_W = $clog2(ISSUE_W + 1)
) (
  input  logic [ISSUE_W-1:0]                 cand_valid,
  input  logic [ISSUE_W-1:0]                 cand_crit,
  input  logic [N_FAST-1:0]                  fast_ready,
  input  logic [N_SLOW-1:0]                  slow_ready,
  output logic [ISSUE_W-1:0]                 cand_grant,
  output disp_class_e [ISSUE_W-1:0]          cand_class,
  output logic [ISSUE_W-1:0][UIDX_W-1:0]     cand_unit,
  output logic [N_FAST-1:0]                  fast_sel,
  output logic [N_FAST-1:0][SLOT_W-1:0]      fast_slot,
  output logic [N_SLOW-1:0]                  slow_sel,
  output logic [N_SLOW-1:0][SLOT_W-1:0]      slow_slot
);

  logic [N_FAST-1:0] fast_free;
  logic [N_SLOW-1:0] slow_free;
  logic              got_fast, got_slow;
  logic [UIDX_W-1:0] fidx, sidx;

  always_comb begin
    fast_free  = fast_ready;
    slow_free  = slow_ready;
    cand_grant = '0;
    cand_class = '{default: CL_NS};
    cand_unit  = '0;
    fast_sel   = '0;
    fast_slot  = '0;
    slow_sel   = '0;
    slow_slot  = '0;
    for (int i = 0; i < ISSUE_W; i++) begin
      // First free unit of each kind.
      got_fast = 1'b0;
      fidx     = '0;
      for (int f = N_FAST - 1; f >= 0; f--) begin
        if (fast_free[f]) begin
          got_fast = 1'b1;
          fidx     = UIDX_W'(f);
        end
      end
      got_slow = 1'b0;
      sidx     = '0;
      for (int s = N_SLOW - 1; s >= 0; s--) begin
        if (slow_free[s]) begin
          got_slow = 1'b1;
          sidx     = UIDX_W'(s);
        end
      end

      if (cand_valid[i]) begin
        if (cand_crit[i] ? got_fast : !got_slow && got_fast) begin
          cand_grant[i]     = 1'b1;
          cand_class[i]     = cand_crit[i] ? CL_CF : CL_NF;
          cand_unit[i]      = fidx;
          fast_free[fidx]   = 1'b0;
          fast_sel[fidx]    = 1'b1;
          fast_slot[fidx]   = SLOT_W'(i);
        end else if (got_slow) begin
          cand_grant[i]     = 1'b1;
          cand_class[i]     = cand_crit[i] ? CL_CS : CL_NS;
          cand_unit[i]      = sidx;
          slow_free[sidx]   = 1'b0;
          slow_sel[sidx]    = 1'b1;
          slow_slot[sidx]   = SLOT_W'(i);
        end
      end
    end
  end

endmodule
