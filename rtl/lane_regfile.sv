// lane_regfile: the slice of the core register file that belongs to one lane.
//
// As in the document, the register file is built from single-ported SRAM
// banks instead of a multiported memory, and each lane owns its own narrow
// register file that holds only the warps assigned to that lane. One entry is
// LW words wide: the register values of one group of LW threads (LW = 1 for
// pure temporal SIMT, 4 for the STSIMT4 configuration), so only the operands of
// active thread groups are ever fetched.
//
// Addressing (this design's choice; the document gives none):
//   vector register r of local warp w, thread group g:
//       entry = w*NV*G + r*G + g                  (G = WARP_SIZE/LW groups)
//   scalar register s of local warp w (the extra scalar addressing mode):
//       word  = w*NS + s,  entry = DEPTH-1 - word/LW, lane-word = word%LW
//   Scalars are packed LW to an entry and grow down from the top, so they use
//   one word per warp instead of one per thread.
//   bank = (entry + entry/NB) mod NB, row = entry/NB  (a rotating interleave
//   so that the two sources of one group usually sit in different banks).
// NV (vector registers per thread) and NS (scalar registers per warp) are
// kernel-launch settings.
//
// Ports: two logical read ports and one write port per cycle. A bank serves
// one access per cycle; the write always wins, read port 0 beats read port 1,
// and two reads of the same entry share one bank access. rd_gnt is
// combinational; granted data appears on rd_data one cycle later (registered
// SRAM output). A scalar read returns its word broadcast to all LW slots.
// A scalar write stores wr_data of the lowest set bit of wr_mask.
module lane_regfile
  import tsimt_pkg::*;
#(
  parameter int unsigned LW    = 4,      // threads per group (lane width)
  parameter int unsigned NB    = 8,      // SRAM banks per lane
  parameter int unsigned DEPTH = 2048    // entries per lane
) (
  input  logic                 clk,
  input  logic [6:0]           cfg_nv,
  input  logic [6:0]           cfg_ns,
  // read ports
  input  logic [1:0]           rd_req,
  input  logic [1:0]           rd_scalar,
  input  reg_t                 rd_reg   [2],
  input  logic [7:0]           rd_group [2],
  input  logic [7:0]           rd_lw    [2],
  output logic [1:0]           rd_gnt,
  output logic [1:0]           rd_valid,
  output word_t                rd_data  [2][LW],
  // write port
  input  logic                 wr_en,
  input  logic                 wr_scalar,
  input  reg_t                 wr_reg,
  input  logic [7:0]           wr_group,
  input  logic [7:0]           wr_lw,
  input  word_t                wr_data  [LW],
  input  logic [LW-1:0]        wr_mask,
  // statistics
  output logic                 bank_conflict
);
  localparam int unsigned G    = WARP_SIZE / LW;
  localparam int unsigned ROWS = DEPTH / NB;
  localparam int unsigned EW   = $clog2(DEPTH);
  localparam int unsigned BW   = (NB > 1) ? $clog2(NB) : 1;
  localparam int unsigned SW   = (LW > 1) ? $clog2(LW) : 1;
  localparam int unsigned RW_  = $clog2(ROWS);

  typedef struct packed {
    logic [BW-1:0]  bank;
    logic [RW_-1:0] row;
    logic [SW-1:0]  word;
    logic [EW-1:0]  entry;
  } loc_t;

  function automatic loc_t locate(logic sc, reg_t r, logic [7:0] g, logic [7:0] w,
                                  logic [6:0] nv, logic [6:0] ns);
    loc_t l;
    logic [31:0] e, sw;
    if (sc) begin
      sw = 32'(w) * 32'(ns) + 32'(r);
      e  = 32'(DEPTH - 1) - sw / LW;
      l.word = SW'(sw % LW);
    end else begin
      e = (32'(w) * 32'(nv) + 32'(r)) * G + 32'(g);
      l.word = '0;
    end
    l.entry = EW'(e);
    l.row   = RW_'(e / NB);
    l.bank  = BW'((e + e / NB) % NB);
    return l;
  endfunction

  loc_t rl [2];
  loc_t wl;
  always_comb begin
    for (int p = 0; p < 2; p++)
      rl[p] = locate(rd_scalar[p], rd_reg[p], rd_group[p], rd_lw[p], cfg_nv, cfg_ns);
    wl = locate(wr_scalar, wr_reg, wr_group, wr_lw, cfg_nv, cfg_ns);
  end

  // bank arbitration
  always_comb begin
    rd_gnt[0] = rd_req[0] && !(wr_en && rl[0].bank == wl.bank);
    rd_gnt[1] = rd_req[1] && !(wr_en && rl[1].bank == wl.bank) &&
                !(rd_gnt[0] && rl[1].bank == rl[0].bank && rl[1].entry != rl[0].entry);
    bank_conflict = (rd_req[0] && !rd_gnt[0]) || (rd_req[1] && !rd_gnt[1]);
  end

  // scalar write: pick the value of the single active slot
  word_t wr_scalar_val;
  always_comb begin
    wr_scalar_val = wr_data[0];
    for (int k = LW - 1; k >= 0; k--)
      if (wr_mask[k]) wr_scalar_val = wr_data[k];
  end

  logic [LW-1:0][XLEN-1:0] bank_q [NB];

  for (genvar b = 0; b < NB; b++) begin : g_bank
    logic [LW-1:0][XLEN-1:0] mem [ROWS];
    logic          rd_hit;
    logic [RW_-1:0] rd_row;
    always_comb begin
      rd_hit = 1'b0;
      rd_row = rl[0].row;
      if (rd_gnt[1] && rl[1].bank == BW'(b)) begin rd_hit = 1'b1; rd_row = rl[1].row; end
      if (rd_gnt[0] && rl[0].bank == BW'(b)) begin rd_hit = 1'b1; rd_row = rl[0].row; end
    end
    always_ff @(posedge clk) begin
      if (wr_en && wl.bank == BW'(b)) begin
        for (int k = 0; k < LW; k++) begin
          if (wr_scalar) begin
            if (wl.word == SW'(k)) mem[wl.row][k] <= wr_scalar_val;
          end else if (wr_mask[k]) begin
            mem[wl.row][k] <= wr_data[k];
          end
        end
      end
      if (rd_hit) bank_q[b] <= mem[rd_row];
    end
  end

  loc_t rl_q [2];
  logic [1:0] rs_q;
  always_ff @(posedge clk) begin
    rd_valid <= rd_gnt;
    for (int p = 0; p < 2; p++) begin
      rl_q[p] <= rl[p];
      rs_q[p] <= rd_scalar[p];
    end
  end

  always_comb begin
    for (int p = 0; p < 2; p++)
      for (int k = 0; k < LW; k++)
        rd_data[p][k] = rs_q[p] ? bank_q[rl_q[p].bank][rl_q[p].word]
                                : bank_q[rl_q[p].bank][k];
  end

endmodule
