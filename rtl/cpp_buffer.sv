// cpp_buffer: critical path prediction (CPP) buffer.
//
// A direct-mapped, cache-like table indexed by the program counter. Every
// entry is a saturating up-down counter. When commit reports that an
// instruction was critical, its counter goes up by INC; otherwise it goes
// down by DEC; it saturates at 0 and at 2**CTR_W-1. An instruction is
// predicted critical when its counter exceeds THRESH. The defaults (4K
// entries, 6-bit counters, +8 / -1, threshold 8) are the evaluated
// configuration.
//
// Interface
//   rd_pc[i]        -> rd_crit[i], rd_ctr[i]   lookup ports, one per issue slot.
//                      The read is combinational: the prediction is valid in
//                      the same cycle as the PC.
//   upd_valid[j], upd_pc[j], upd_crit[j]       training ports, one per commit
//                      slot; the counter changes at the next clock edge.
// Timing: after reset the table clears itself, one entry per cycle
// (ENTRIES cycles, init_busy high); during that time every lookup predicts
// "not critical" and updates are dropped. A lookup in the same cycle as an
// update of the same entry sees the old counter. Several updates to the same entry in one cycle are all
// applied, in port order (port 0 first), each one saturating.
//
// Design choices not fixed by the source: the hash function is plain bit
// selection of the word-address PC bits above PC_SHIFT (the figure only shows
// a "hash function" box); all counters start at 0 (not critical), cleared by
// the walk above so that the table stays a plain RAM without a reset; the
// comparison is strict (counter > THRESH), following the "exceeds" wording
// and the ">th" comparator of the block diagram.
module cpp_buffer #(
  parameter int unsigned ENTRIES  = 4096,
  parameter int unsigned CTR_W    = 6,
  parameter int unsigned INC      = 8,
  parameter int unsigned DEC      = 1,
  parameter int unsigned THRESH   = 8,
  parameter int unsigned RD_PORTS = 8,
  parameter int unsigned WR_PORTS = 8,
  parameter int unsigned PC_W     = 32,
  parameter int unsigned PC_SHIFT = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [RD_PORTS-1:0][PC_W-1:0] rd_pc,
  output logic [RD_PORTS-1:0]           rd_crit,
  output logic [RD_PORTS-1:0][CTR_W-1:0] rd_ctr,
  input  logic [WR_PORTS-1:0]           upd_valid,
  input  logic [WR_PORTS-1:0][PC_W-1:0] upd_pc,
  input  logic [WR_PORTS-1:0]           upd_crit,
  output logic                          init_busy
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned CTR_MAX = (1 << CTR_W) - 1;

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [CTR_W-1:0] ctr_t;

  ctr_t ctr_q [ENTRIES];

  function automatic idx_t hash_pc(logic [PC_W-1:0] pc);
    return idx_t'(pc >> PC_SHIFT);
  endfunction

  function automatic ctr_t sat_step(ctr_t c, logic crit);
    int unsigned v;
    v = int'(c);
    if (crit) v = (v + INC > CTR_MAX) ? CTR_MAX : v + INC;
    else      v = (v < DEC) ? 0 : v - DEC;
    return ctr_t'(v);
  endfunction

  // Lookup.
  always_comb begin
    for (int i = 0; i < RD_PORTS; i++) begin
      rd_ctr[i]  = ctr_q[hash_pc(rd_pc[i])];
      rd_crit[i] = !init_busy && int'(rd_ctr[i]) > THRESH;
    end
  end

  // Update: port j computes the entry's value after ports 0..j, and only the
  // last port that touches an entry writes it.
  idx_t upd_idx [WR_PORTS];
  ctr_t upd_new [WR_PORTS];
  logic upd_we  [WR_PORTS];

  always_comb begin
    for (int j = 0; j < WR_PORTS; j++) begin
      upd_idx[j] = hash_pc(upd_pc[j]);
    end
    for (int j = 0; j < WR_PORTS; j++) begin
      upd_new[j] = ctr_q[upd_idx[j]];
      for (int k = 0; k <= j; k++) begin
        if (upd_valid[k] && upd_idx[k] == upd_idx[j])
          upd_new[j] = sat_step(upd_new[j], upd_crit[k]);
      end
      upd_we[j] = upd_valid[j] && !init_busy;
      for (int k = j + 1; k < WR_PORTS; k++) begin
        if (upd_valid[k] && upd_idx[k] == upd_idx[j]) upd_we[j] = 1'b0;
      end
    end
  end

  // Clearing walk after reset.
  idx_t init_idx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy  <= 1'b1;
      init_idx_q <= '0;
    end else if (init_busy) begin
      init_idx_q <= init_idx_q + 1'b1;
      if (int'(init_idx_q) == ENTRIES - 1) init_busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (init_busy) begin
      ctr_q[init_idx_q] <= '0;
    end else begin
      for (int j = 0; j < WR_PORTS; j++) begin
        if (upd_we[j]) ctr_q[upd_idx[j]] <= upd_new[j];
      end
    end
  end

endmodule
