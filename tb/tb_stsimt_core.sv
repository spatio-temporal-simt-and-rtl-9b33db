// tb_stsimt_core: end-to-end test of the STSIMT core at its default size
// (2 lanes x 4 threads, 32 warps, 64 KB register file and shared memory).
//
// A kernel with a divergent if/else, scalar (warp-uniform) instructions, a
// register-bank conflict and a strided shared-memory gather is run twice: once
// with 200 threads (six full warps and one warp of 8 threads) and once with
// 1024 threads (all 32 warps). Expected memory contents, instruction counts,
// thread-instruction counts, divergence and reconvergence counts are computed
// here from the kernel's definition. The test also requires that every
// mechanism of the core is seen at least once: compaction, scalar execution,
// divergence, reconvergence, register-bank conflict, shared-memory bank
// conflict, memory stall and issue conflict. Cycle counts are checked against
// the issue limit (one instruction per cycle) and the execution limit
// (8 thread slots per cycle).
module tb_stsimt_core;
  import tsimt_pkg::*;

  localparam int NLANES = 2, LW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        im_we;   pc_t im_addr;  instr_t im_wdata;
  logic        h_en, h_we; word_t h_addr, h_wdata, h_rdata;
  logic        start;   logic [15:0] cfg_nthreads; logic [6:0] cfg_nv, cfg_ns;
  logic        running, done;
  logic [31:0] st_cycles, st_issued, st_scalar_issued, st_thread_ops;
  logic [31:0] st_issue_conf1, st_issue_conf2, st_issue_conf3p, st_rf_conflicts;
  logic [31:0] st_smem_conflicts, st_mem_stall, st_div_branches, st_reconverge, st_compacted;
  logic        st_stack_overflow;

  stsimt_core dut (.*);

  int checks = 0, failures = 0;
  int seen_compact = 0, seen_scalar = 0, seen_div = 0, seen_reconv = 0;
  int seen_rfc = 0, seen_smc = 0, seen_stall = 0, seen_issconf = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ kernel ----
  localparam int NPROG = 21;
  instr_t prog [NPROG];
  initial begin
    //                 op       sc ds d   s0s s0 s1s s1 ui imm
    prog[0]  = mk_alu(OP_WID, 1, 1, 0,  0, 0, 0, 0, 0, 0);     // s0 = warp id
    prog[1]  = mk_alu(OP_TID, 0, 0, 0,  0, 0, 0, 0, 0, 0);     // v0 = tid
    prog[2]  = mk_alu(OP_LDS, 0, 0, 3,  0, 0, 0, 0, 0, 0);     // v3 = x[tid]
    prog[3]  = mk_alu(OP_SHR, 0, 0, 1,  0, 0, 0, 0, 1, 2);     // v1 = tid >> 2
    prog[4]  = mk_alu(OP_AND, 0, 0, 1,  0, 1, 0, 0, 1, 1);     // v1 &= 1
    prog[5]  = mk_alu(OP_MOV, 0, 0, 8,  0, 0, 0, 0, 1, 5);     // v8 = 5
    prog[6]  = mk_alu(OP_ADD, 0, 0, 5,  0, 0, 0, 8, 0, 0);     // v5 = v0 + v8
    prog[7]  = mk_bra(0, 0, 1, 0, 10, 12);                     // if v1 goto 10
    prog[8]  = mk_alu(OP_ADD, 0, 0, 2,  0, 3, 1, 0, 0, 0);     // v2 = v3 + s0
    prog[9]  = mk_bra(0, 0, 0, 1, 12, 12);                     // goto 12
    prog[10] = mk_alu(OP_MUL, 0, 0, 2,  0, 3, 0, 3, 0, 0);     // v2 = v3 * v3
    prog[11] = mk_alu(OP_ADD, 0, 0, 2,  0, 2, 0, 0, 1, 7);     // v2 += 7
    prog[12] = mk_alu(OP_MUL, 1, 1, 2,  1, 0, 0, 0, 1, 3);     // s2 = s0 * 3
    prog[13] = mk_alu(OP_ADD, 0, 0, 4,  0, 2, 1, 2, 0, 0);     // v4 = v2 + s2
    prog[14] = mk_alu(OP_STS, 0, 0, 0,  0, 0, 0, 4, 0, 1024); // y[tid] = v4
    prog[15] = mk_alu(OP_SHL, 0, 0, 7,  0, 0, 0, 0, 1, 5);     // v7 = tid << 5
    prog[16] = mk_alu(OP_AND, 0, 0, 7,  0, 7, 0, 0, 1, 1023);  // v7 &= 1023
    prog[17] = mk_alu(OP_LDS, 0, 0, 6,  0, 7, 0, 0, 0, 0);     // v6 = x[v7]
    prog[18] = mk_alu(OP_ADD, 0, 0, 6,  0, 6, 0, 5, 0, 0);     // v6 += v5
    prog[19] = mk_alu(OP_STS, 0, 0, 0,  0, 0, 0, 6, 0, 2048); // z[tid] = v6
    prog[20] = mk_alu(OP_EXIT, 0, 0, 0, 0, 0, 0, 0, 0, 0);
  end

  function automatic int xval(int i); return i * 7 + 3; endfunction

  function automatic int popc(logic [31:0] m); return $countones(m); endfunction
  function automatic bit has_empty_group(logic [31:0] m);
    for (int g = 0; g < WARP_SIZE / LW; g++) if (m[g*LW +: LW] == '0) return 1;
    return 0;
  endfunction

  task automatic host_write(input int a, input int d);
    @(negedge clk); h_en = 1; h_we = 1; h_addr = a; h_wdata = d;
    @(negedge clk); h_en = 0; h_we = 0;
  endtask
  task automatic host_read(input int a, output int d);
    @(negedge clk); h_en = 1; h_we = 0; h_addr = a;
    @(negedge clk); h_en = 0; d = h_rdata;
  endtask

  task automatic run(input int nthreads);
    int nwarps, exp_issued, exp_ops, exp_div, exp_cmp, exp_scalar, d, y, z, w;
    logic [31:0] m, bits, t_m, n_m;
    int t0;
    // expected totals
    nwarps = (nthreads + 31) / 32;
    exp_issued = 0; exp_ops = 0; exp_div = 0; exp_cmp = 0; exp_scalar = 0;
    for (int wi = 0; wi < nwarps; wi++) begin
      m = '0;
      for (int t = 0; t < 32; t++) if (wi*32 + t < nthreads) m[t] = 1;
      bits = '0;
      for (int t = 0; t < 32; t++) bits[t] = ((wi*32 + t) >> 2) & 1;
      t_m = m & bits; n_m = m & ~bits;
      exp_issued += 17; exp_scalar += 2;
      exp_ops    += 2 + 15 * popc(m);
      if (has_empty_group(m)) exp_cmp += 15;
      if (n_m != 0) begin exp_issued += 2; exp_ops += 2*popc(n_m); if (has_empty_group(n_m)) exp_cmp += 2; end
      if (t_m != 0) begin exp_issued += 2; exp_ops += 2*popc(t_m); if (has_empty_group(t_m)) exp_cmp += 2; end
      if (t_m != 0 && n_m != 0) exp_div++;
    end
    // launch
    @(negedge clk);
    cfg_nthreads = 16'(nthreads); cfg_nv = 9; cfg_ns = 3; start = 1;
    @(negedge clk); start = 0;
    t0 = 0;
    while (!done) begin @(negedge clk); t0++; end
    $display("run %0d threads: cycles=%0d issued=%0d scalar=%0d thread_ops=%0d IPC=%0.2f",
             nthreads, st_cycles, st_issued, st_scalar_issued, st_thread_ops,
             real'(st_thread_ops) / real'(st_cycles));
    $display("  issue conflicts 1/2/3+=%0d/%0d/%0d rf_conf=%0d smem_conf=%0d mem_stall=%0d div=%0d reconv=%0d compacted=%0d",
             st_issue_conf1, st_issue_conf2, st_issue_conf3p, st_rf_conflicts,
             st_smem_conflicts, st_mem_stall, st_div_branches, st_reconverge, st_compacted);
    check(st_issued == 32'(exp_issued), $sformatf("issued %0d exp %0d", st_issued, exp_issued));
    check(st_thread_ops == 32'(exp_ops), $sformatf("thread ops %0d exp %0d", st_thread_ops, exp_ops));
    check(st_scalar_issued == 32'(exp_scalar), "scalar instruction count");
    check(st_div_branches == 32'(exp_div), $sformatf("divergent branches %0d exp %0d", st_div_branches, exp_div));
    check(st_reconverge == 32'(2*exp_div), $sformatf("reconvergences %0d exp %0d", st_reconverge, 2*exp_div));
    check(st_compacted == 32'(exp_cmp), $sformatf("compacted %0d exp %0d", st_compacted, exp_cmp));
    check(st_cycles >= st_issued, "at most one issue per cycle");
    check(st_cycles * 32'(NLANES*LW) >= st_thread_ops, "at most NLANES*LW thread slots per cycle");
    check(!st_stack_overflow, "no stack overflow");
    seen_compact += st_compacted; seen_scalar += st_scalar_issued; seen_div += st_div_branches;
    seen_reconv += st_reconverge; seen_rfc += st_rf_conflicts; seen_smc += st_smem_conflicts;
    seen_stall += st_mem_stall; seen_issconf += st_issue_conf1 + st_issue_conf2 + st_issue_conf3p;
    // results
    for (int t = 0; t < nthreads; t++) begin
      w = t / 32;
      y = (((t >> 2) & 1) != 0) ? xval(t) * xval(t) + 7 : xval(t) + w;
      y += 3 * w;
      host_read(1024 + t, d);
      check(d == y, $sformatf("y[%0d]=%0d exp %0d", t, d, y));
      z = xval((t * 32) & 1023) + t + 5;
      host_read(2048 + t, d);
      check(d == z, $sformatf("z[%0d]=%0d exp %0d", t, d, z));
    end
  endtask

  initial begin
    im_we = 0; im_addr = '0; im_wdata = '0; h_en = 0; h_we = 0; h_addr = '0; h_wdata = '0;
    start = 0; cfg_nthreads = '0; cfg_nv = '0; cfg_ns = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NPROG; i++) begin
      @(negedge clk); im_we = 1; im_addr = pc_t'(i); im_wdata = prog[i];
    end
    @(negedge clk); im_we = 0;
    for (int i = 0; i < 1024; i++) host_write(i, xval(i));
    for (int i = 1024; i < 3072; i++) host_write(i, 32'hdead_beef);
    run(200);
    for (int i = 1024; i < 3072; i++) host_write(i, 32'hdead_beef);
    run(1024);
    check(seen_compact > 0, "compaction happened");
    check(seen_scalar > 0,  "scalar execution happened");
    check(seen_div > 0,     "divergence happened");
    check(seen_reconv > 0,  "reconvergence happened");
    check(seen_rfc > 0,     "register bank conflict happened");
    check(seen_smc > 0,     "shared memory bank conflict happened");
    check(seen_stall > 0,   "memory stall happened");
    check(seen_issconf > 0, "issue conflict happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
