// tb_tsimt_lane: one STSIMT4 lane with a model shared memory that grants a
// random subset of requests (forcing memory stalls and retries).
// Short instruction sequences for one warp compute thread ids, warp-uniform
// scalar values, arithmetic, stores, loads and a branch; results are read back
// from the model memory and compared with values computed here. It checks
// compaction timing (an instruction with k active 4-thread groups occupies the
// sequencer for exactly k cycles when nothing conflicts), that scalar
// instructions run once, the branch's per-thread taken mask, and that
// back-to-back independent instructions overlap correctly.
module tb_tsimt_lane;
  import tsimt_pkg::*;
  localparam int LW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [6:0] cfg_nv = 9, cfg_ns = 2;
  logic issue_valid, issue_ready; instr_t issue_instr; wid_t issue_warp; wmask_t issue_mask;
  logic done_valid, br_valid; wid_t done_warp, br_warp; instr_t done_instr; wmask_t br_taken;
  logic [LW-1:0] sm_req, sm_gnt, sm_rvalid; logic sm_we;
  word_t sm_addr [LW], sm_wdata [LW], sm_rdata [LW];
  logic busy, rf_conflict, mem_stall; logic [7:0] thread_ops;
  tsimt_lane #(.LW(LW), .NB(8), .DEPTH(2048), .NLANES(2)) dut (.*);

  int checks = 0, failures = 0, stalls = 0, ops = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // model shared memory: random grants, one-cycle load latency
  word_t mem [4096];
  bit    grant_all = 0;
  logic [LW-1:0] rnd_gnt;
  always @(posedge clk) for (int k = 0; k < LW; k++) rnd_gnt[k] <= (($urandom & 3) != 0);
  always_comb
    for (int k = 0; k < LW; k++) sm_gnt[k] = sm_req[k] && (grant_all || rnd_gnt[k]);
  always_ff @(posedge clk) begin
    for (int k = 0; k < LW; k++) begin
      sm_rvalid[k] <= sm_gnt[k] && !sm_we;
      if (sm_gnt[k] && !sm_we) sm_rdata[k] <= mem[sm_addr[k] % 4096];
      if (sm_gnt[k] && sm_we)  mem[sm_addr[k] % 4096] <= sm_wdata[k];
    end
    if (mem_stall) stalls++;
    ops += int'(thread_ops);
  end

  task automatic issue(input instr_t i, input int w, input wmask_t m);
    @(negedge clk);
    while (!issue_ready) @(negedge clk);
    issue_valid = 1; issue_instr = i; issue_warp = wid_t'(w); issue_mask = m;
    @(negedge clk); issue_valid = 0;
  endtask
  task automatic drain();
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  function automatic int groups(wmask_t m);
    int n = 0;
    for (int g = 0; g < 8; g++) if (m[g*4 +: 4] != 0) n++;
    return n;
  endfunction

  initial begin
    wmask_t m; int w, cyc, tid, ops0; wmask_t exp_br; bit got_br;
    issue_valid = 0; issue_instr = '0; issue_warp = 0; issue_mask = 0;
    for (int i = 0; i < 4096; i++) mem[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int round = 0; round < 24; round++) begin
      w = $urandom % 32;
      m = (round == 0) ? 32'hFFFF_FFFF : wmask_t'($urandom) & wmask_t'($urandom);
      if (m == 0) m = 32'h0000_8000;
      grant_all = (round % 2 == 0);
      // compaction timing: TID on an idle lane
      @(negedge clk);
      ops0 = ops;
      issue_valid = 1; issue_instr = mk_alu(OP_TID, 0, 0, 0, 0, 0, 0, 0, 0, 0);
      issue_warp = wid_t'(w); issue_mask = m;
      @(negedge clk); issue_valid = 0; cyc = 1;
      while (!issue_ready) begin @(negedge clk); cyc++; end
      check(cyc == groups(m), $sformatf("sequencer cycles %0d for %0d groups", cyc, groups(m)));
      issue(mk_alu(OP_WID, 1, 1, 0, 0, 0, 0, 0, 0, 0), w, m);              // s0 = w
      issue(mk_alu(OP_MOV, 1, 1, 1, 0, 0, 0, 0, 1, 100 + round), w, m);    // s1 = 100+round
      drain();
      issue(mk_alu(OP_ADD, 0, 0, 1, 0, 0, 1, 0, 0, 0), w, m);              // v1 = tid + w
      issue(mk_alu(OP_AND, 0, 0, 5, 0, 0, 0, 0, 1, 1), w, m);              // v5 = tid & 1
      issue(mk_alu(OP_SHL, 0, 0, 8, 0, 0, 0, 0, 1, 1), w, m);              // v8 = tid << 1
      drain();
      issue(mk_alu(OP_MUL, 0, 0, 2, 0, 1, 1, 1, 0, 0), w, m);              // v2 = v1 * s1
      issue(mk_alu(OP_SUB, 0, 0, 6, 0, 0, 0, 8, 0, 0), w, m);              // v6 = tid - v8 (bank conflict)
      drain();
      issue(mk_alu(OP_STS, 0, 0, 0, 0, 0, 0, 2, 0, 0), w, m);              // mem[tid] = v2
      drain();
      issue(mk_alu(OP_LDS, 0, 0, 3, 0, 0, 0, 0, 0, 0), w, m);              // v3 = mem[tid]
      drain();
      issue(mk_alu(OP_ADD, 0, 0, 4, 0, 3, 0, 6, 0, 0), w, m);              // v4 = v3 + v6
      drain();
      issue(mk_alu(OP_STS, 0, 0, 0, 0, 0, 0, 4, 0, 2048), w, m);           // mem[2048+tid] = v4
      // branch on v5 (odd threads taken)
      exp_br = m & 32'hAAAA_AAAA;
      got_br = 0;
      fork
        issue(mk_bra(0, 0, 5, 0, 9, 10), w, m);
        begin
          while (!br_valid) @(posedge clk);
          got_br = 1;
          check(br_warp == wid_t'(w) && br_taken == exp_br, $sformatf("branch mask %h exp %h", br_taken, exp_br));
        end
      join
      drain();
      check(got_br, "branch reported");
      // 11 vector instructions run on every active thread, the 2 scalar ones once
      check(ops - ops0 == 11 * $countones(m) + 2, $sformatf("thread ops %0d, expected %0d", ops - ops0, 11 * $countones(m) + 2));
      for (int t = 0; t < 32; t++) if (m[t]) begin
        tid = w * 32 + t;
        check(mem[tid % 4096] == word_t'((tid + w) * (100 + round)), $sformatf("mem[%0d]", tid));
        check(mem[(2048 + tid) % 4096] == word_t'((tid + w) * (100 + round) + (tid - 2 * tid)),
              $sformatf("mem[2048+%0d]", tid));
      end
      for (int t = 0; t < 4096; t++) mem[t] = 0;
    end
    check(stalls > 0, "memory stalls seen");
    $display("lane: memory stall cycles=%0d thread ops=%0d", stalls, ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
