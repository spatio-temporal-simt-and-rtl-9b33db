// fetch_decode: the core's instruction fetch and decode unit.
//
// The document keeps fetch and decode as in a conventional GPU core: the unit
// reads the instruction cache and places decoded instructions in the per-warp
// instruction buffer. Here one warp is fetched per cycle, chosen round-robin
// among warps that are launched, have an empty IB slot with no fetch in
// flight, are not waiting for a branch outcome, have not fetched EXIT and whose
// reconvergence stack top is valid. The fetch reads the I-cache at the stack's
// PC and advances that PC; the word returns one cycle later and is decoded
// (the instruction word is already in decoded field form, so decode is a
// type cast) into the IB together with the mask captured at fetch.
// After a BRA, the warp stops fetching until `br_clear[w]` reports the branch
// resolved; after an EXIT it stops for good. `stk_hold` keeps the warp's
// stack from popping while a fetched word is in flight or a branch is pending. `flush` restarts at launch.
module fetch_decode
  import tsimt_pkg::*;
#(
  parameter int unsigned NW = MAX_WARPS
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   flush,
  input  logic   [NW-1:0] warp_active,
  input  logic   [NW-1:0] stk_valid,
  input  pc_t    stk_pc   [NW],
  input  wmask_t stk_mask [NW],
  input  logic   [NW-1:0] ib_valid,
  input  logic   [NW-1:0] br_clear,
  // I-cache read port
  output logic   ic_rd_en,
  output pc_t    ic_rd_addr,
  input  instr_t ic_rd_data,
  // to the reconvergence stacks and the IB
  output logic   [NW-1:0] advance,
  output logic   fill_valid,
  output wid_t   fill_warp,
  output instr_t fill_instr,
  output wmask_t fill_mask,
  output logic   [NW-1:0] br_pending,
  output logic   [NW-1:0] stk_hold,
  output logic   [NW-1:0] stopped
);
  logic   [NW-1:0] cand;
  logic   pick_v;
  wid_t   pick, rr_q;
  logic   infl_q;
  wid_t   infl_w_q;
  wmask_t infl_m_q;

  always_comb begin
    for (int w = 0; w < NW; w++)
      cand[w] = warp_active[w] && !stopped[w] && !br_pending[w] && stk_valid[w] &&
                !ib_valid[w] && !(infl_q && infl_w_q == wid_t'(w));
    pick_v = 1'b0;
    pick   = '0;
    for (int i = NW - 1; i >= 0; i--) begin
      automatic int w = (int'(rr_q) + i) % NW;
      if (cand[w]) begin pick_v = 1'b1; pick = wid_t'(w); end
    end
    ic_rd_en   = pick_v;
    ic_rd_addr = stk_pc[pick];
    advance    = '0;
    if (pick_v) advance[pick] = 1'b1;
    fill_valid = infl_q;
    fill_warp  = infl_w_q;
    fill_instr = ic_rd_data;
    fill_mask  = infl_m_q;
    // no reconvergence pop while a fetched word of the warp is still unseen
    stk_hold   = br_pending;
    if (infl_q) stk_hold[infl_w_q] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q <= '0; infl_q <= 1'b0; infl_w_q <= '0; infl_m_q <= '0;
      br_pending <= '0; stopped <= '0;
    end else if (flush) begin
      rr_q <= '0; infl_q <= 1'b0;
      br_pending <= '0; stopped <= '0;
    end else begin
      infl_q   <= pick_v;
      infl_w_q <= pick;
      infl_m_q <= stk_mask[pick];
      if (pick_v) rr_q <= wid_t'((int'(pick) + 1) % NW);
      br_pending <= br_pending & ~br_clear;
      if (infl_q && ic_rd_data.op == OP_BRA)  br_pending[infl_w_q] <= 1'b1;
      if (infl_q && ic_rd_data.op == OP_EXIT) stopped[infl_w_q]    <= 1'b1;
    end
  end
endmodule
