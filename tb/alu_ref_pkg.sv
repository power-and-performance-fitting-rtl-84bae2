// alu_ref_pkg: independent reference model of the integer operations, used
// by the testbenches to check the functional units. Written separately from
// the RTL's operation function, operation by operation.
package alu_ref_pkg;
  import fu_pkg::*;

  function automatic logic [31:0] ref_alu(alu_op_e op, logic [31:0] a, logic [31:0] b);
    int signed sa, sb;
    logic [31:0] r;
    sa = a;
    sb = b;
    r  = 32'h0;
    if (op == OP_ADD)        r = 32'(a + b);
    else if (op == OP_SUB)   r = 32'(a + ~b + 32'd1);
    else if (op == OP_AND)   r = a & b;
    else if (op == OP_OR)    r = a | b;
    else if (op == OP_XOR)   r = (a | b) & ~(a & b);
    else if (op == OP_SLL)   begin r = a; repeat (b[4:0]) r = {r[30:0], 1'b0}; end
    else if (op == OP_SRL)   begin r = a; repeat (b[4:0]) r = {1'b0, r[31:1]}; end
    else if (op == OP_SRA)   begin r = a; repeat (b[4:0]) r = {r[31], r[31:1]}; end
    else if (op == OP_SLT)   r = (sa < sb) ? 32'd1 : 32'd0;
    else if (op == OP_SLTU)  r = ({1'b0, a} < {1'b0, b}) ? 32'd1 : 32'd0;
    else if (op == OP_CMPEQ) r = (a ^ b) == 0 ? 32'd1 : 32'd0;
    return r;
  endfunction

  function automatic fu_req_t rand_req(logic [TAG_W-1:0] tag);
    fu_req_t q;
    q.op  = alu_op_e'($urandom_range(0, 10));
    q.a   = $urandom;
    q.b   = ($urandom_range(0, 3) == 0) ? 32'($urandom_range(0, 40)) : $urandom;
    q.tag = tag;
    return q;
  endfunction
endpackage
