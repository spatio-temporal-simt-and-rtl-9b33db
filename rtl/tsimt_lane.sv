// tsimt_lane: one temporal-SIMT lane.
//
// A lane receives one warp instruction and its active mask from the core's
// warp scheduler, keeps them in its instruction and active-mask registers, and
// then sequences the warp's active thread groups through its own register-file
// slice, operand collector and LW-wide execution units, decoupled from the
// scheduler. It holds the registers of the warps statically assigned to it
// (warp w lives in lane w mod NLANES at local index w / NLANES) and cannot execute other warps. With LW=1
// this is the pure TSIMT lane of the document; with LW=4 it is the STSIMT4
// lane (4 thread slots per cycle, 8 groups per 32-thread warp).
//
// Pipeline (one thread group per stage; the staging is this design's own):
//   S0  sequencer picks the next active group; the operand collector requests
//       the group's source registers from the banked register file. A source
//       whose bank is busy (write-back or the other source) is retried in the
//       next cycle; sources already read are held, so the group leaves S0 once
//       all its sources have been granted.
//   S1  register data returns (SRAM latency of one cycle) and is merged with
//       held operands; an immediate replaces the second ALU operand.
//   EX  LW integer/branch units compute, or the LW thread addresses of an
//       LDS/STS go to the shared memory. A thread whose bank access is not
//       granted stays pending and the whole lane stalls until all are served.
//   WB  results (or load data arriving one cycle after the grant) are written
//       to the register file; write-back has priority on the bank ports.
// Scalar instructions (compiler-marked) run once, on the first active thread;
// scalar operands are read through the register file's scalar addressing mode
// and broadcast to the group. A BRA accumulates its per-thread outcome over
// all groups and reports the taken mask after its last group.
//
// Interface: issue_* is accepted when issue_ready is high (the last group of
// the current instruction may leave S0 in the same cycle). done_* pulses at the
// write-back of an instruction's last group (scoreboard release); br_* pulses
// together with it for a BRA. sm_* is the lane's LW-port shared-memory
// connection: requests are combinational from EX, sm_gnt in the same cycle,
// sm_rvalid/sm_rdata one cycle after a granted load.
module tsimt_lane
  import tsimt_pkg::*;
#(
  parameter int unsigned LW    = 4,
  parameter int unsigned NB    = 8,
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned NLANES = 2     // lanes in the core
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [6:0]    cfg_nv,
  input  logic [6:0]    cfg_ns,
  // from the warp scheduler
  input  logic          issue_valid,
  input  instr_t        issue_instr,
  input  wid_t          issue_warp,
  input  wmask_t        issue_mask,
  output logic          issue_ready,
  // completion
  output logic          done_valid,
  output wid_t          done_warp,
  output instr_t        done_instr,
  output logic          br_valid,
  output wid_t          br_warp,
  output wmask_t        br_taken,
  // shared memory port
  output logic [LW-1:0] sm_req,
  output logic          sm_we,
  output word_t         sm_addr  [LW],
  output word_t         sm_wdata [LW],
  input  logic [LW-1:0] sm_gnt,
  input  logic [LW-1:0] sm_rvalid,
  input  word_t         sm_rdata [LW],
  // statistics
  output logic          busy,
  output logic [7:0]    thread_ops,
  output logic          rf_conflict,
  output logic          mem_stall
);
  // ---------------------------------------------------------------- S0 ----
  instr_t ir_q;
  wid_t   ir_warp_q;
  wmask_t ir_mask_q;

  logic          seq_ready, seq_valid, seq_last, s0_adv, move;
  logic [7:0]    seq_group;
  logic [LW-1:0] seq_tmask;

  lane_sequencer #(.LW(LW)) u_seq (
    .clk, .rst_n,
    .load(issue_valid), .load_mask(issue_mask), .load_scalar(issue_instr.scalar),
    .advance(s0_adv), .ready(seq_ready), .valid(seq_valid),
    .group(seq_group), .tmask(seq_tmask), .last(seq_last)
  );
  assign issue_ready = seq_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir_q <= '0; ir_warp_q <= '0; ir_mask_q <= '0;
    end else if (issue_valid && seq_ready) begin
      ir_q <= issue_instr; ir_warp_q <= issue_warp; ir_mask_q <= issue_mask;
    end
  end

  logic       need0, need1, got0_q, got1_q;
  logic [1:0] rd_req, rd_gnt, rd_valid;
  word_t      rd_data [2][LW];
  logic [7:0] lwarp;

  assign need0 = uses_src0(ir_q);
  assign need1 = uses_src1(ir_q);
  assign lwarp = 8'(ir_warp_q / NLANES);
  assign rd_req[0] = seq_valid && move && need0 && !got0_q;
  assign rd_req[1] = seq_valid && move && need1 && !got1_q;
  assign s0_adv = seq_valid && move && (!need0 || got0_q || rd_gnt[0])
                                   && (!need1 || got1_q || rd_gnt[1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got0_q <= 1'b0; got1_q <= 1'b0;
    end else if (s0_adv) begin
      got0_q <= 1'b0; got1_q <= 1'b0;
    end else begin
      got0_q <= got0_q | rd_gnt[0];
      got1_q <= got1_q | rd_gnt[1];
    end
  end

  // write-back port signals (driven in WB below)
  logic          wr_en;
  word_t         wr_data [LW];
  logic [LW-1:0] wr_mask;
  logic [7:0]    wr_group, wr_lw;
  instr_t        wb_instr;

  lane_regfile #(.LW(LW), .NB(NB), .DEPTH(DEPTH)) u_rf (
    .clk, .cfg_nv, .cfg_ns,
    .rd_req, .rd_scalar({ir_q.src1_s, ir_q.src0_s}),
    .rd_reg('{ir_q.src0, ir_q.src1}),
    .rd_group('{seq_group, seq_group}),
    .rd_lw('{lwarp, lwarp}),
    .rd_gnt, .rd_valid, .rd_data,
    .wr_en, .wr_scalar(wb_instr.dst_s), .wr_reg(wb_instr.dst),
    .wr_group, .wr_lw, .wr_data, .wr_mask,
    .bank_conflict(rf_conflict)
  );

  // ---------------------------------------------------------------- S1 ----
  logic          s1_valid, s1_now0, s1_now1, s1_last;
  instr_t        s1_instr;
  wid_t          s1_warp;
  wmask_t        s1_fmask;
  logic [7:0]    s1_group;
  logic [LW-1:0] s1_tmask;
  word_t         hold0 [LW], hold1 [LW];
  word_t         v0 [LW], v1 [LW], vb [LW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0; s1_now0 <= 1'b0; s1_now1 <= 1'b0;
      s1_instr <= '0; s1_warp <= '0; s1_fmask <= '0; s1_group <= '0;
      s1_tmask <= '0; s1_last <= 1'b0;
    end else if (move) begin
      s1_valid <= s0_adv;
      s1_now0  <= rd_gnt[0];
      s1_now1  <= rd_gnt[1];
      s1_instr <= ir_q;
      s1_warp  <= ir_warp_q;
      s1_fmask <= ir_mask_q;
      s1_group <= seq_group;
      s1_tmask <= seq_tmask;
      s1_last  <= seq_last;
    end else begin
      // stalled: the data returned this cycle is now in the hold registers
      s1_now0 <= 1'b0;
      s1_now1 <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < LW; k++) begin
      if (rd_valid[0]) hold0[k] <= rd_data[0][k];
      if (rd_valid[1]) hold1[k] <= rd_data[1][k];
    end
  end

  always_comb begin
    for (int k = 0; k < LW; k++) begin
      v0[k] = s1_now0 ? rd_data[0][k] : hold0[k];
      v1[k] = s1_now1 ? rd_data[1][k] : hold1[k];
      vb[k] = (s1_instr.use_imm && s1_instr.op != OP_STS)
              ? word_t'($signed(s1_instr.imm)) : v1[k];
    end
  end

  // ---------------------------------------------------------------- EX ----
  logic          ex_valid, ex_last, ex_stall, adv_q;
  instr_t        ex_instr;
  wid_t          ex_warp;
  wmask_t        ex_fmask, br_acc_q, br_bits;
  logic [7:0]    ex_group;
  logic [LW-1:0] ex_tmask, ex_pend, ex_taken;
  word_t         ex_a [LW], ex_b [LW], ex_res [LW], ldbuf [LW];
  logic          ex_mem;

  assign ex_mem   = ex_valid && is_mem(ex_instr.op);
  assign ex_stall = ex_mem && ((ex_pend & ~sm_gnt) != '0);
  assign move     = !ex_stall;
  assign mem_stall = ex_stall;

  for (genvar k = 0; k < LW; k++) begin : g_alu
    lane_alu u_alu (
      .op(ex_instr.op), .use_imm(ex_instr.use_imm),
      .a(ex_a[k]), .b(ex_b[k]),
      .tid(word_t'(ex_warp) * WARP_SIZE + word_t'(ex_group) * LW + k),
      .wid(word_t'(ex_warp)),
      .result(ex_res[k]), .taken(ex_taken[k])
    );
  end

  always_comb begin
    for (int k = 0; k < LW; k++) begin
      sm_req[k]   = ex_mem && ex_pend[k];
      sm_addr[k]  = ex_a[k] + word_t'($signed(ex_instr.imm));
      sm_wdata[k] = ex_b[k];
    end
    sm_we = (ex_instr.op == OP_STS);
    // branch outcome of this group, placed at its thread positions
    br_bits = '0;
    if (ex_instr.scalar) begin
      br_bits = (|(ex_taken & ex_tmask)) ? ex_fmask : '0;
    end else begin
      for (int k = 0; k < LW; k++)
        br_bits[ex_group*LW + k] = ex_taken[k] && ex_tmask[k];
    end
    thread_ops = '0;
    if (ex_valid && move)
      for (int k = 0; k < LW; k++) thread_ops = thread_ops + 8'(ex_tmask[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid <= 1'b0; ex_instr <= '0; ex_warp <= '0; ex_fmask <= '0;
      ex_group <= '0; ex_tmask <= '0; ex_pend <= '0; ex_last <= 1'b0;
      br_acc_q <= '0; adv_q <= 1'b0;
    end else begin
      adv_q <= move && ex_valid;
      if (move) begin
        ex_valid <= s1_valid;
        ex_instr <= s1_instr;
        ex_warp  <= s1_warp;
        ex_fmask <= s1_fmask;
        ex_group <= s1_group;
        ex_tmask <= s1_tmask;
        ex_last  <= s1_last;
        ex_pend  <= (s1_valid && is_mem(s1_instr.op)) ? s1_tmask : '0;
        if (ex_valid && ex_instr.op == OP_BRA)
          br_acc_q <= ex_last ? '0 : (br_acc_q | br_bits);
      end else begin
        ex_pend <= ex_pend & ~sm_gnt;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (move) begin
      for (int k = 0; k < LW; k++) begin
        ex_a[k] <= v0[k];
        ex_b[k] <= vb[k];
      end
    end
    for (int k = 0; k < LW; k++)
      if (sm_rvalid[k] && !adv_q) ldbuf[k] <= sm_rdata[k];
  end

  // ---------------------------------------------------------------- WB ----
  logic          wb_valid, wb_last;
  wid_t          wb_warp;
  wmask_t        wb_br;
  logic [7:0]    wb_group;
  logic [LW-1:0] wb_tmask;
  word_t         wb_data [LW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_valid <= 1'b0; wb_instr <= '0; wb_warp <= '0; wb_br <= '0;
      wb_group <= '0; wb_tmask <= '0; wb_last <= 1'b0;
    end else begin
      wb_valid <= ex_valid && move;
      wb_instr <= ex_instr;
      wb_warp  <= ex_warp;
      wb_br    <= br_acc_q | br_bits;
      wb_group <= ex_group;
      wb_tmask <= ex_tmask;
      wb_last  <= ex_last;
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < LW; k++)
      wb_data[k] <= (ex_instr.op == OP_LDS)
                    ? ((sm_rvalid[k] && !adv_q) ? sm_rdata[k] : ldbuf[k])
                    : ex_res[k];
  end

  always_comb begin
    wr_en    = wb_valid && writes_dst(wb_instr) && (wb_tmask != '0);
    wr_group = wb_group;
    wr_lw    = 8'(wb_warp / NLANES);
    wr_mask  = wb_tmask;
    for (int k = 0; k < LW; k++)
      wr_data[k] = (wb_instr.op == OP_LDS && sm_rvalid[k]) ? sm_rdata[k] : wb_data[k];
  end

  assign done_valid = wb_valid && wb_last;
  assign done_warp  = wb_warp;
  assign done_instr = wb_instr;
  assign br_valid   = done_valid && wb_instr.op == OP_BRA;
  assign br_warp    = wb_warp;
  assign br_taken   = wb_br;

  assign busy = seq_valid || s1_valid || ex_valid || wb_valid;

  assert property (@(posedge clk) disable iff (!rst_n)
                   issue_valid |-> issue_ready)
    else $error("tsimt_lane: instruction issued to a busy lane");

endmodule
