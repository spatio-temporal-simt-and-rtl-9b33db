// stsimt_core: a spatio-temporal SIMT (STSIMT) GPU core with scalarization.
//
// Instead of broadcasting each warp instruction across a warp-wide SIMD array
// (spatial SIMT), the core is built from NLANES independent lanes. Every warp
// is bound to one lane, which executes the warp's instructions over time, LW
// threads per cycle, skipping thread groups that have no active thread
// (compaction). NLANES*LW is the core's execution width: NLANES=8, LW=1 is pure
// temporal SIMT (TSIMT); the default NLANES=2, LW=4 is the STSIMT4
// organisation, the best configuration of the document. Compiler-marked scalar
// instructions execute once per warp on the same lane datapath and keep their
// results in a packed scalar region of the lane register file.
//
// Blocks: icache -> fetch_decode -> instr_buffer (one slot per warp) ->
// warp_scheduler (one issue per cycle, scoreboard-checked) -> tsimt_lane x
// NLANES, each with its register-file slice, operand collector and execution
// units, sharing one banked shared_mem; one simt_stack per warp handles
// divergence and reconvergence.
//
// Use: write the kernel into the instruction store (im_*), place inputs in
// shared memory (h_*), then pulse `start` with the thread count and the
// register budget (cfg_nv vector registers per thread, cfg_ns scalar
// registers per warp). Threads 0..cfg_nthreads-1 form warps of 32, warp w
// running on lane w mod NLANES, all starting at PC 0; a partly filled last
// warp starts with only its present threads active. `done` rises when every
// launched warp has issued EXIT and all lanes have drained. The st_* outputs
// are event counters since launch. Global memory, floating-point and special
// function units, and the block/register allocator are not part of this core.
module stsimt_core
  import tsimt_pkg::*;
#(
  parameter int unsigned NLANES      = 2,
  parameter int unsigned LW          = 4,
  parameter int unsigned NW          = MAX_WARPS,
  parameter int unsigned RF_BYTES    = 65536,
  parameter int unsigned RF_BANKS    = 8,
  parameter int unsigned SMEM_BYTES  = 65536,
  parameter int unsigned SMEM_BANKS  = 32,
  parameter int unsigned STACK_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction store load
  input  logic        im_we,
  input  pc_t         im_addr,
  input  instr_t      im_wdata,
  // host access to shared memory
  input  logic        h_en,
  input  logic        h_we,
  input  word_t       h_addr,
  input  word_t       h_wdata,
  output word_t       h_rdata,
  // kernel launch
  input  logic        start,
  input  logic [15:0] cfg_nthreads,
  input  logic [6:0]  cfg_nv,
  input  logic [6:0]  cfg_ns,
  output logic        running,
  output logic        done,
  // statistics
  output logic [31:0] st_cycles,
  output logic [31:0] st_issued,
  output logic [31:0] st_scalar_issued,
  output logic [31:0] st_thread_ops,
  output logic [31:0] st_issue_conf1,
  output logic [31:0] st_issue_conf2,
  output logic [31:0] st_issue_conf3p,
  output logic [31:0] st_rf_conflicts,
  output logic [31:0] st_smem_conflicts,
  output logic [31:0] st_mem_stall,
  output logic [31:0] st_div_branches,
  output logic [31:0] st_reconverge,
  output logic [31:0] st_compacted,
  output logic        st_stack_overflow
);
  localparam int unsigned DEPTH = RF_BYTES / NLANES / (LW * 4);
  localparam int unsigned NPORT = NLANES * LW;
  localparam int unsigned G     = WARP_SIZE / LW;

  // ------------------------------------------------------------ launch ----
  logic   [NW-1:0] warp_active, exited;
  wmask_t init_mask [NW];
  logic   launched_q;

  always_comb begin
    for (int w = 0; w < NW; w++) begin
      for (int t = 0; t < WARP_SIZE; t++)
        init_mask[w][t] = (w * WARP_SIZE + t) < int'(cfg_nthreads);
    end
  end

  // ------------------------------------------------------------ stacks ----
  logic   [NW-1:0] stk_valid, stk_adv, stk_hold, br_clear, stk_ovf;
  pc_t    stk_pc   [NW];
  wmask_t stk_mask [NW];
  logic [$clog2(STACK_DEPTH+1)-1:0] stk_depth [NW];

  logic   [NLANES-1:0] l_done, l_br, l_ready, l_busy, l_rfc, l_mstall;
  wid_t   l_done_w [NLANES], l_br_w [NLANES];
  instr_t l_done_i [NLANES];
  wmask_t l_br_t   [NLANES];
  logic [7:0] l_tops [NLANES];

  for (genvar w = 0; w < NW; w++) begin : g_warp
    localparam int L = w % NLANES;
    assign br_clear[w] = l_br[L] && l_br_w[L] == wid_t'(w);
    simt_stack #(.DEPTH(STACK_DEPTH)) u_stack (
      .clk, .rst_n,
      .init(start), .init_mask(init_mask[w]), .init_pc('0),
      .advance(stk_adv[w]), .br_pending(stk_hold[w]),
      .br_valid(br_clear[w]), .br_taken(l_br_t[L]),
      .br_target(pc_t'(l_done_i[L].imm)), .br_rpc(l_done_i[L].rpc),
      .valid(stk_valid[w]), .pc(stk_pc[w]), .mask(stk_mask[w]),
      .depth(stk_depth[w]), .overflow(stk_ovf[w])
    );
  end

  // ------------------------------------------------------- front end ----
  logic   ic_en;
  pc_t    ic_addr;
  instr_t ic_data;
  logic   fill_v;
  wid_t   fill_w;
  instr_t fill_i;
  wmask_t fill_m;
  logic   [NW-1:0] br_pending, stopped, ib_valid, sb_ready;
  instr_t ib_instr [NW];
  wmask_t ib_mask  [NW];
  logic   iss_v;
  wid_t   iss_w;
  logic   [NLANES-1:0] iss_lane;
  logic   [7:0] iss_conf;

  icache u_icache (
    .clk, .wr_en(im_we), .wr_addr(im_addr), .wr_data(im_wdata),
    .rd_en(ic_en), .rd_addr(ic_addr), .rd_data(ic_data)
  );

  fetch_decode #(.NW(NW)) u_fetch (
    .clk, .rst_n, .flush(start),
    .warp_active, .stk_valid, .stk_pc, .stk_mask, .ib_valid, .br_clear,
    .ic_rd_en(ic_en), .ic_rd_addr(ic_addr), .ic_rd_data(ic_data),
    .advance(stk_adv), .fill_valid(fill_v), .fill_warp(fill_w),
    .fill_instr(fill_i), .fill_mask(fill_m),
    .br_pending, .stk_hold, .stopped
  );

  instr_buffer #(.NW(NW)) u_ib (
    .clk, .rst_n, .flush(start),
    .fill_valid(fill_v), .fill_warp(fill_w), .fill_instr(fill_i), .fill_mask(fill_m),
    .issue_valid(iss_v), .issue_warp(iss_w),
    .valid(ib_valid), .instr(ib_instr), .mask(ib_mask)
  );

  scoreboard #(.NW(NW), .NLANES(NLANES)) u_sb (
    .clk, .rst_n, .flush(start),
    .set_valid(iss_v), .set_warp(iss_w), .set_instr(ib_instr[iss_w]),
    .clr_valid(l_done), .clr_warp(l_done_w), .clr_instr(l_done_i),
    .ib_instr, .ready(sb_ready)
  );

  warp_scheduler #(.NW(NW), .NLANES(NLANES)) u_ws (
    .clk, .rst_n,
    .ib_valid, .sb_ready, .lane_ready(l_ready),
    .issue_valid(iss_v), .issue_warp(iss_w), .issue_lane(iss_lane),
    .conflicts(iss_conf)
  );

  // ------------------------------------------------------------- lanes ----
  logic [NPORT-1:0] sm_req, sm_we, sm_gnt, sm_rvalid;
  word_t sm_addr [NPORT], sm_wdata [NPORT], sm_rdata [NPORT];
  logic [7:0] sm_conf;

  for (genvar l = 0; l < NLANES; l++) begin : g_lane
    logic [LW-1:0] req, gnt, rv;
    logic          we;
    word_t         ad [LW], wd [LW], rd [LW];
    for (genvar k = 0; k < LW; k++) begin : g_port
      assign sm_req[l*LW+k]   = req[k];
      assign sm_we[l*LW+k]    = we;
      assign sm_addr[l*LW+k]  = ad[k];
      assign sm_wdata[l*LW+k] = wd[k];
      assign gnt[k] = sm_gnt[l*LW+k];
      assign rv[k]  = sm_rvalid[l*LW+k];
      assign rd[k]  = sm_rdata[l*LW+k];
    end
    tsimt_lane #(.LW(LW), .NB(RF_BANKS), .DEPTH(DEPTH), .NLANES(NLANES)) u_lane (
      .clk, .rst_n, .cfg_nv, .cfg_ns,
      .issue_valid(iss_lane[l]), .issue_instr(ib_instr[iss_w]),
      .issue_warp(iss_w), .issue_mask(ib_mask[iss_w]), .issue_ready(l_ready[l]),
      .done_valid(l_done[l]), .done_warp(l_done_w[l]), .done_instr(l_done_i[l]),
      .br_valid(l_br[l]), .br_warp(l_br_w[l]), .br_taken(l_br_t[l]),
      .sm_req(req), .sm_we(we), .sm_addr(ad), .sm_wdata(wd),
      .sm_gnt(gnt), .sm_rvalid(rv), .sm_rdata(rd),
      .busy(l_busy[l]), .thread_ops(l_tops[l]),
      .rf_conflict(l_rfc[l]), .mem_stall(l_mstall[l])
    );
  end

  shared_mem #(.NPORT(NPORT), .BANKS(SMEM_BANKS), .BYTES(SMEM_BYTES)) u_smem (
    .clk, .rst_n,
    .req(sm_req), .we(sm_we), .addr(sm_addr), .wdata(sm_wdata),
    .gnt(sm_gnt), .rvalid(sm_rvalid), .rdata(sm_rdata),
    .h_en, .h_we, .h_addr, .h_wdata, .h_rdata,
    .conflicts(sm_conf)
  );

  // ----------------------------------------------------- warp life cycle ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      warp_active <= '0; exited <= '0; launched_q <= 1'b0;
    end else if (start) begin
      launched_q <= 1'b1;
      exited     <= '0;
      for (int w = 0; w < NW; w++) warp_active[w] <= init_mask[w] != '0;
    end else if (iss_v && ib_instr[iss_w].op == OP_EXIT) begin
      exited[iss_w] <= 1'b1;
    end
  end

  assign done    = launched_q && ((warp_active & ~exited) == '0) && (l_busy == '0);
  assign running = launched_q && !done;

  // --------------------------------------------------------- statistics ----
  logic [$clog2(STACK_DEPTH+1)-1:0] depth_q [NW];
  logic [31:0] tops_sum, div_sum, pop_sum, cmp_sum;

  always_comb begin
    tops_sum = '0; div_sum = '0; pop_sum = '0; cmp_sum = '0;
    for (int l = 0; l < NLANES; l++) begin
      tops_sum = tops_sum + 32'(l_tops[l]);
      if (l_br[l] && (l_br_t[l] & stk_mask[l_br_w[l]]) != '0 &&
          (l_br_t[l] & stk_mask[l_br_w[l]]) != stk_mask[l_br_w[l]])
        div_sum = div_sum + 1;
    end
    for (int w = 0; w < NW; w++)
      if (stk_depth[w] < depth_q[w]) pop_sum = pop_sum + 1;
    // an issued vector instruction whose mask leaves at least one group empty
    if (iss_v && !ib_instr[iss_w].scalar) begin
      for (int g = 0; g < G; g++)
        if (ib_mask[iss_w][g*LW +: LW] == '0) cmp_sum = 1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_cycles <= '0; st_issued <= '0; st_scalar_issued <= '0; st_thread_ops <= '0;
      st_issue_conf1 <= '0; st_issue_conf2 <= '0; st_issue_conf3p <= '0;
      st_rf_conflicts <= '0; st_smem_conflicts <= '0; st_mem_stall <= '0;
      st_div_branches <= '0; st_reconverge <= '0; st_compacted <= '0;
      st_stack_overflow <= 1'b0;
      for (int w = 0; w < NW; w++) depth_q[w] <= '0;
    end else if (start) begin
      st_cycles <= '0; st_issued <= '0; st_scalar_issued <= '0; st_thread_ops <= '0;
      st_issue_conf1 <= '0; st_issue_conf2 <= '0; st_issue_conf3p <= '0;
      st_rf_conflicts <= '0; st_smem_conflicts <= '0; st_mem_stall <= '0;
      st_div_branches <= '0; st_reconverge <= '0; st_compacted <= '0;
      st_stack_overflow <= 1'b0;
      for (int w = 0; w < NW; w++) depth_q[w] <= '0;
    end else begin
      for (int w = 0; w < NW; w++) depth_q[w] <= stk_depth[w];
      if (running) begin
        st_cycles        <= st_cycles + 1;
        st_issued        <= st_issued + 32'(iss_v);
        st_scalar_issued <= st_scalar_issued + 32'(iss_v && ib_instr[iss_w].scalar);
        st_thread_ops    <= st_thread_ops + tops_sum;
        st_issue_conf1   <= st_issue_conf1  + 32'(iss_conf == 8'd1);
        st_issue_conf2   <= st_issue_conf2  + 32'(iss_conf == 8'd2);
        st_issue_conf3p  <= st_issue_conf3p + 32'(iss_conf >= 8'd3);
        st_rf_conflicts  <= st_rf_conflicts + 32'($countones(l_rfc));
        st_smem_conflicts <= st_smem_conflicts + 32'(sm_conf);
        st_mem_stall     <= st_mem_stall + 32'($countones(l_mstall));
        st_div_branches  <= st_div_branches + div_sum;
        st_reconverge    <= st_reconverge + pop_sum;
        st_compacted     <= st_compacted + cmp_sum;
      end
      if (stk_ovf != '0) st_stack_overflow <= 1'b1;
    end
  end

endmodule
