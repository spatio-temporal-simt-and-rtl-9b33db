// simt_stack: per-warp reconvergence stack (immediate post-dominator style).
//
// The document keeps the conventional reconvergence stack unchanged in the
// TSIMT core; this is a plain implementation of it. Each entry holds a PC, the
// reconvergence PC (rpc) and an active mask; the top entry is the path the warp
// executes. The fetch unit reads `pc`/`mask`, and `advance` steps the top PC
// after each fetch. When a BRA resolves (`br_valid`, with the taken mask from
// the lane), the active threads split into taken (T) and not-taken (N):
//   T empty: continue at the fall-through PC (already in the top entry);
//   N empty: jump, top PC = target;
//   both:    top PC = rpc (it becomes the reconvergence entry), push the
//            not-taken path (fall-through PC, mask N), then the taken path
//            (target, mask T), which runs first.
// An entry whose PC reaches its rpc is popped (reconvergence); `valid` is low
// in that cycle so nothing is fetched from the finished path. The bottom entry
// never pops, and nothing pops while the warp waits for a branch outcome
// (`br_pending`), so the outcome applies to the path that fetched it. Overflow is flagged and asserted.
module simt_stack
  import tsimt_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   init,
  input  wmask_t init_mask,
  input  pc_t    init_pc,
  input  logic   advance,
  input  logic   br_pending,
  input  logic   br_valid,
  input  wmask_t br_taken,
  input  pc_t    br_target,
  input  pc_t    br_rpc,
  output logic   valid,
  output pc_t    pc,
  output wmask_t mask,
  output logic [$clog2(DEPTH+1)-1:0] depth,
  output logic   overflow
);
  localparam int unsigned SPW = $clog2(DEPTH);

  pc_t    pc_q   [DEPTH];
  pc_t    rpc_q  [DEPTH];
  wmask_t mask_q [DEPTH];
  logic [SPW-1:0] sp_q;

  logic   at_rpc;
  wmask_t t_m, n_m;

  always_comb begin
    pc     = pc_q[sp_q];
    mask   = mask_q[sp_q];
    at_rpc = (sp_q != '0) && (pc_q[sp_q] == rpc_q[sp_q]) && !br_pending;
    valid  = !at_rpc;
    depth  = ($clog2(DEPTH+1))'(sp_q);
    t_m    = br_taken & mask_q[sp_q];
    n_m    = mask_q[sp_q] & ~br_taken;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp_q     <= '0;
      overflow <= 1'b0;
      for (int i = 0; i < DEPTH; i++) begin
        pc_q[i] <= '0; rpc_q[i] <= '1; mask_q[i] <= '0;
      end
    end else if (init) begin
      sp_q      <= '0;
      overflow  <= 1'b0;
      pc_q[0]   <= init_pc;
      rpc_q[0]  <= '1;
      mask_q[0] <= init_mask;
    end else if (br_valid) begin
      if (t_m != '0 && n_m == '0) begin
        pc_q[sp_q] <= br_target;
      end else if (t_m != '0) begin
        if (32'(sp_q) + 2 >= DEPTH) begin
          overflow <= 1'b1;
        end else begin
          pc_q[sp_q]      <= br_rpc;
          pc_q[sp_q+1]    <= pc_q[sp_q];
          rpc_q[sp_q+1]   <= br_rpc;
          mask_q[sp_q+1]  <= n_m;
          pc_q[sp_q+2]    <= br_target;
          rpc_q[sp_q+2]   <= br_rpc;
          mask_q[sp_q+2]  <= t_m;
          sp_q            <= sp_q + 2;
        end
      end
    end else if (at_rpc) begin
      sp_q <= sp_q - 1;
    end else if (advance) begin
      pc_q[sp_q] <= pc_q[sp_q] + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(advance && !valid))
    else $error("simt_stack: fetch from a finished path");
  assert property (@(posedge clk) disable iff (!rst_n) !overflow)
    else $error("simt_stack: overflow");

endmodule
