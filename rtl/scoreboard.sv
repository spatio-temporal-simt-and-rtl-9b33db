// scoreboard: register dependency tracking for the warp scheduler.
//
// The document's single warp scheduler uses a scoreboard to see which buffered
// instructions have their dependencies fulfilled. This one keeps, per warp, one
// pending bit for every vector and every scalar register. Issuing an instruction
// that writes a register sets its bit; the lane clears it when the write-back
// of the instruction's last thread group is done (one release port per lane).
// `ready[w]` is high when neither source nor destination of warp w's buffered
// instruction is pending (read-after-write and write-after-write). A release
// and a set in the same cycle both take effect.
module scoreboard
  import tsimt_pkg::*;
#(
  parameter int unsigned NW     = MAX_WARPS,
  parameter int unsigned NLANES = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   flush,
  input  logic   set_valid,
  input  wid_t   set_warp,
  input  instr_t set_instr,
  input  logic   [NLANES-1:0] clr_valid,
  input  wid_t   clr_warp  [NLANES],
  input  instr_t clr_instr [NLANES],
  input  instr_t ib_instr  [NW],
  output logic   [NW-1:0] ready
);
  logic [NREGS-1:0] vpend [NW];
  logic [NREGS-1:0] spend [NW];

  function automatic logic pending(logic [NREGS-1:0] v, logic [NREGS-1:0] s,
                                   logic sc, reg_t r);
    return sc ? s[r] : v[r];
  endfunction

  always_comb begin
    for (int w = 0; w < NW; w++) begin
      ready[w] = 1'b1;
      if (uses_src0(ib_instr[w]) &&
          pending(vpend[w], spend[w], ib_instr[w].src0_s, ib_instr[w].src0)) ready[w] = 1'b0;
      if (uses_src1(ib_instr[w]) &&
          pending(vpend[w], spend[w], ib_instr[w].src1_s, ib_instr[w].src1)) ready[w] = 1'b0;
      if (writes_dst(ib_instr[w]) &&
          pending(vpend[w], spend[w], ib_instr[w].dst_s, ib_instr[w].dst)) ready[w] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < NW; w++) begin vpend[w] <= '0; spend[w] <= '0; end
    end else if (flush) begin
      for (int w = 0; w < NW; w++) begin vpend[w] <= '0; spend[w] <= '0; end
    end else begin
      for (int l = 0; l < NLANES; l++)
        if (clr_valid[l] && writes_dst(clr_instr[l])) begin
          if (clr_instr[l].dst_s) spend[clr_warp[l]][clr_instr[l].dst] <= 1'b0;
          else                    vpend[clr_warp[l]][clr_instr[l].dst] <= 1'b0;
        end
      if (set_valid && writes_dst(set_instr)) begin
        if (set_instr.dst_s) spend[set_warp][set_instr.dst] <= 1'b1;
        else                 vpend[set_warp][set_instr.dst] <= 1'b1;
      end
    end
  end
endmodule
