// fu_pkg: types and constants shared by the criticality-steered execution
// cluster. It defines the integer operation set executed by both the fast
// and the slow functional units, the request and result records that travel
// between the dispatcher and the units, and the four dispatch classes used to
// describe where an instruction went (non-critical/slow, critical/slow,
// non-critical/fast, critical/fast).
//
// The 32-bit data width follows the 32-bit integer register file of the
// evaluated machine. The operation list and the 6-bit result tag (enough for
// a 64-entry instruction window) are this design's own choices.
package fu_pkg;

  localparam int unsigned XLEN  = 32;
  localparam int unsigned TAG_W = 6;

  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,
    OP_SUB  = 4'd1,
    OP_AND  = 4'd2,
    OP_OR   = 4'd3,
    OP_XOR  = 4'd4,
    OP_SLL  = 4'd5,
    OP_SRL  = 4'd6,
    OP_SRA  = 4'd7,
    OP_SLT  = 4'd8,
    OP_SLTU = 4'd9,
    OP_CMPEQ= 4'd10
  } alu_op_e;

  // One integer operation handed to a functional unit.
  typedef struct packed {
    alu_op_e           op;
    logic [XLEN-1:0]   a;
    logic [XLEN-1:0]   b;
    logic [TAG_W-1:0]  tag;
  } fu_req_t;

  // One result written back by a functional unit.
  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    logic [XLEN-1:0]   value;
  } fu_res_t;

  // Where an instruction was dispatched, by predicted criticality and by
  // kind of unit.
  typedef enum logic [1:0] {
    CL_NS = 2'd0,   // predicted non-critical, slow unit
    CL_CS = 2'd1,   // predicted critical, slow unit
    CL_NF = 2'd2,   // predicted non-critical, fast unit
    CL_CF = 2'd3    // predicted critical, fast unit
  } disp_class_e;

  function automatic logic [XLEN-1:0] alu_compute(alu_op_e op,
                                                   logic [XLEN-1:0] a,
                                                   logic [XLEN-1:0] b);
    logic [XLEN-1:0] r;
    case (op)
      OP_ADD:   r = a + b;
      OP_SUB:   r = a - b;
      OP_AND:   r = a & b;
      OP_OR:    r = a | b;
      OP_XOR:   r = a ^ b;
      OP_SLL:   r = a << b[4:0];
      OP_SRL:   r = a >> b[4:0];
      OP_SRA:   r = $unsigned($signed(a) >>> b[4:0]);
      OP_SLT:   r = {{(XLEN-1){1'b0}}, $signed(a) < $signed(b)};
      OP_SLTU:  r = {{(XLEN-1){1'b0}}, a < b};
      OP_CMPEQ: r = {{(XLEN-1){1'b0}}, a == b};
      default:  r = '0;
    endcase
    return r;
  endfunction

endpackage
