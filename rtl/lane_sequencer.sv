// lane_sequencer: steps a TSIMT lane through the threads of the warp
// instruction it holds, with compaction.
//
// The lane's execution resources are LW threads wide, so a 32-thread warp is a
// sequence of WARP_SIZE/LW aligned thread groups. Following the document, only
// groups that contain at least one active thread are visited: a warp with two
// active threads on a one-wide lane takes two cycles, and on a four-wide lane
// only aligned bundles of four inactive threads are skipped. A scalar
// instruction is executed like a vector instruction with one active thread:
// the sequencer keeps only the lowest active thread (this design's choice of
// which thread stands for the warp).
//
// This module is also the lane's active-mask register. On `load` it captures
// the mask; each cycle it presents the lowest remaining group (`group`, its
// thread mask `tmask`, and `last` when no other group remains). `advance`
// retires the presented group. `ready` is high when a new instruction may be
// loaded in this cycle, including the cycle in which the last group retires,
// so back-to-back instructions leave no bubble.
module lane_sequencer
  import tsimt_pkg::*;
#(
  parameter int unsigned LW = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  wmask_t        load_mask,
  input  logic          load_scalar,
  input  logic          advance,
  output logic          ready,
  output logic          valid,
  output logic [7:0]    group,
  output logic [LW-1:0] tmask,
  output logic          last
);
  localparam int unsigned G = WARP_SIZE / LW;

  wmask_t         mask_q;
  logic [G-1:0]   rem_q;
  logic [G-1:0]   cur_oh;

  always_comb begin
    group  = '0;
    cur_oh = '0;
    for (int g = G - 1; g >= 0; g--)
      if (rem_q[g]) begin group = 8'(g); cur_oh = G'(1) << g; end
    valid = |rem_q;
    tmask = mask_q[group*LW +: LW];
    last  = (rem_q & ~cur_oh) == '0;
    ready = !valid || (advance && last);
  end

  // group occupancy and the scalar (single-thread) reduction of a new mask
  logic [G-1:0] load_rem;
  wmask_t       load_m;
  always_comb begin
    load_rem = '0;
    load_m   = load_mask;
    if (load_scalar) begin
      load_m = '0;
      for (int t = WARP_SIZE - 1; t >= 0; t--)
        if (load_mask[t]) load_m = wmask_t'(1) << t;
    end
    for (int g = 0; g < G; g++) load_rem[g] = |load_m[g*LW +: LW];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q  <= '0;
      mask_q <= '0;
    end else if (load && ready) begin
      rem_q  <= load_rem;
      mask_q <= load_m;
    end else if (advance && valid) begin
      rem_q  <= rem_q & ~cur_oh;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) load |-> ready)
    else $error("lane_sequencer: load while busy");
  assert property (@(posedge clk) disable iff (!rst_n) load |-> (load_mask != '0))
    else $error("lane_sequencer: load with empty active mask");

endmodule
