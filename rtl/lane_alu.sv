// lane_alu: one thread's integer unit (INT) and branch-condition unit (BRU).
//
// The document names INT and BRU units in each lane but does not define their
// operations; the operation set here is this design's own small integer ISA
// (see tsimt_pkg). Purely combinational: `result` is the value written back
// for ALU, MOV, TID and WID operations, `taken` is the branch condition of a
// BRA (source nonzero, or always when use_imm is set). A lane instantiates
// LW copies, one per thread of a group, and executes them in one cycle.
module lane_alu
  import tsimt_pkg::*;
(
  input  op_e   op,
  input  logic  use_imm,
  input  word_t a,
  input  word_t b,
  input  word_t tid,
  input  word_t wid,
  output word_t result,
  output logic  taken
);
  always_comb begin
    unique case (op)
      OP_ADD:  result = a + b;
      OP_SUB:  result = a - b;
      OP_MUL:  result = a * b;
      OP_AND:  result = a & b;
      OP_OR:   result = a | b;
      OP_XOR:  result = a ^ b;
      OP_SHL:  result = a << b[4:0];
      OP_SHR:  result = a >> b[4:0];
      OP_MIN:  result = ($signed(a) < $signed(b)) ? a : b;
      OP_MAX:  result = ($signed(a) > $signed(b)) ? a : b;
      OP_SLT:  result = word_t'($signed(a) < $signed(b));
      OP_SEQ:  result = word_t'(a == b);
      OP_MOV:  result = b;
      OP_TID:  result = tid;
      OP_WID:  result = wid;
      default: result = '0;
    endcase
    taken = use_imm || (a != '0);
  end
endmodule
