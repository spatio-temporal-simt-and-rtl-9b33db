// tsimt_pkg: constants, instruction format and helper functions shared by the
// spatio-temporal SIMT (STSIMT) core.
//
// Warp size (32), the per-core warp limit (32), the 4 KB instruction store and
// the 64 KB register file and shared memory follow the evaluated GPU
// configuration. The instruction set below is this design's own: a small
// integer ISA with enough operations to exercise divergence, scalar
// (warp-uniform) execution and shared-memory traffic. Every instruction
// carries a compiler-set "scalar" bit; a scalar instruction is executed once
// per warp instead of once per thread, and each register operand says whether
// it lives in the per-thread (vector) or per-warp (scalar) register space.
//
// Instruction word (64 bits, see instr_t):
//   op      operation
//   scalar  execute once per warp (first active thread only)
//   dst_s / src0_s / src1_s  operand is a scalar register
//   use_imm second ALU operand is the immediate; for BRA: branch always taken
//   imm     16-bit signed immediate; LDS/STS word offset; BRA target PC
//   rpc     reconvergence PC of a BRA (immediate post-dominator)
package tsimt_pkg;

  localparam int unsigned XLEN      = 32;   // datapath width
  localparam int unsigned WARP_SIZE = 32;   // threads per warp
  localparam int unsigned MAX_WARPS = 32;   // warps per core
  localparam int unsigned WID_W     = $clog2(MAX_WARPS);
  localparam int unsigned NREGS     = 64;   // architectural registers per space
  localparam int unsigned REG_W     = $clog2(NREGS);
  localparam int unsigned IMEM_BYTES = 4096;
  localparam int unsigned IMEM_WORDS = IMEM_BYTES / 8;
  localparam int unsigned PC_W      = $clog2(IMEM_WORDS);

  typedef logic [WARP_SIZE-1:0] wmask_t;
  typedef logic [PC_W-1:0]      pc_t;
  typedef logic [WID_W-1:0]     wid_t;
  typedef logic [REG_W-1:0]     reg_t;
  typedef logic [XLEN-1:0]      word_t;

  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,
    OP_ADD  = 5'd1,
    OP_SUB  = 5'd2,
    OP_MUL  = 5'd3,
    OP_AND  = 5'd4,
    OP_OR   = 5'd5,
    OP_XOR  = 5'd6,
    OP_SHL  = 5'd7,
    OP_SHR  = 5'd8,
    OP_MIN  = 5'd9,
    OP_MAX  = 5'd10,
    OP_SLT  = 5'd11,
    OP_SEQ  = 5'd12,
    OP_MOV  = 5'd13,   // dst = b
    OP_TID  = 5'd14,   // dst = global thread id
    OP_WID  = 5'd15,   // dst = warp id (warp-uniform)
    OP_LDS  = 5'd16,   // dst = smem[src0 + imm]
    OP_STS  = 5'd17,   // smem[src0 + imm] = src1
    OP_BRA  = 5'd18,   // if (src0 != 0 || use_imm) goto imm, reconverge at rpc
    OP_EXIT = 5'd19
  } op_e;

  typedef struct packed {
    logic [10:0] pad;
    op_e         op;
    logic        scalar;
    logic        dst_s;
    reg_t        dst;
    logic        src0_s;
    reg_t        src0;
    logic        src1_s;
    reg_t        src1;
    logic        use_imm;
    logic [15:0] imm;
    pc_t         rpc;
  } instr_t;

  function automatic logic uses_src0(instr_t i);
    case (i.op)
      OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR,
      OP_MIN, OP_MAX, OP_SLT, OP_SEQ, OP_LDS, OP_STS: return 1'b1;
      OP_BRA:  return !i.use_imm;
      default: return 1'b0;
    endcase
  endfunction

  function automatic logic uses_src1(instr_t i);
    case (i.op)
      OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR,
      OP_MIN, OP_MAX, OP_SLT, OP_SEQ, OP_MOV: return !i.use_imm;
      OP_STS:  return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  function automatic logic writes_dst(instr_t i);
    case (i.op)
      OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR,
      OP_MIN, OP_MAX, OP_SLT, OP_SEQ, OP_MOV, OP_TID, OP_WID, OP_LDS: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  function automatic logic is_mem(op_e op);
    return (op == OP_LDS) || (op == OP_STS);
  endfunction

  // Instruction encoders, used by testbenches to build kernels.
  function automatic instr_t mk_alu(op_e op, logic sc, logic ds, int d,
                                    logic s0s, int s0, logic s1s, int s1,
                                    logic ui, int imm);
    instr_t i;
    i = '0;
    i.op = op; i.scalar = sc; i.dst_s = ds; i.dst = reg_t'(d);
    i.src0_s = s0s; i.src0 = reg_t'(s0); i.src1_s = s1s; i.src1 = reg_t'(s1);
    i.use_imm = ui; i.imm = 16'(imm);
    return i;
  endfunction

  function automatic instr_t mk_bra(logic sc, logic cs, int c, logic always_taken,
                                    int target, int reconv);
    instr_t i;
    i = '0;
    i.op = OP_BRA; i.scalar = sc; i.src0_s = cs; i.src0 = reg_t'(c);
    i.use_imm = always_taken; i.imm = 16'(target); i.rpc = pc_t'(reconv);
    return i;
  endfunction

endpackage
