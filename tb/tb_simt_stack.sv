// tb_simt_stack: checks divergence and reconvergence on the per-warp stack.
// A nested if/else is walked by hand: uniform branches must jump without a
// push, a divergent branch pushes the taken path on top of the not-taken path,
// each path pops when its PC reaches the reconvergence PC, the popped entry's
// PC and mask reappear, and no pop happens while a branch is pending. Overflow
// is not provoked (it is an assertion in the stack). A random phase then drives 20000 cycles
// of structured branching (random taken masks, nested reconvergence points,
// pending-branch holds, re-launches) against a reference model of the stack.
module tb_simt_stack;
  import tsimt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init, advance, br_pending, br_valid, valid, overflow;
  wmask_t init_mask, br_taken, mask; pc_t init_pc, br_target, br_rpc, pc;
  logic [3:0] depth;
  simt_stack #(.DEPTH(8)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s (pc=%0d mask=%h depth=%0d)", s, pc, mask, depth); end
  endtask
  task automatic step(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); check(valid, "valid while stepping"); advance = 1;
      @(negedge clk); advance = 0;
    end
  endtask
  task automatic branch(input wmask_t t, input int tgt, input int rpc);
    @(negedge clk); br_valid = 1; br_taken = t; br_target = pc_t'(tgt); br_rpc = pc_t'(rpc);
    @(negedge clk); br_valid = 0;
  endtask

  // Reference model for the random phase: the same stack semantics written
  // as plain arrays. Branches are generated like structured code: the
  // reconvergence PC lies ahead of the branch and inside the enclosing path,
  // the target between them.
  pc_t    m_pc [8], m_rpc [8];
  wmask_t m_mask [8];
  int     m_sp;
  task automatic random_phase();
    bit at_rpc; wmask_t t, n; int room, pushes = 0, pops = 0, maxsp = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      init = 0; advance = 0; br_valid = 0; br_pending = 0;
      if (cyc % 300 == 0) begin
        init = 1; init_mask = wmask_t'($urandom) | 1; init_pc = pc_t'($urandom % 256);
        @(negedge clk); init = 0;
        m_sp = 0; m_pc[0] = init_pc; m_rpc[0] = '1; m_mask[0] = init_mask;
      end
      check(depth == 4'(m_sp) && pc == m_pc[m_sp] && mask == m_mask[m_sp], "random: state matches model");
      br_pending = ($urandom % 5 == 0);
      #1;
      at_rpc = (m_sp != 0) && (m_pc[m_sp] == m_rpc[m_sp]) && !br_pending;
      check(valid == !at_rpc, "random: valid");
      room = (m_sp == 0) ? 40 : int'(m_rpc[m_sp]) - int'(m_pc[m_sp]);
      if (!at_rpc && room > 1 && m_sp + 2 < 8 && $urandom % 4 == 0) begin
        br_valid = 1;
        br_rpc = pc_t'(int'(m_pc[m_sp]) + 1 + int'($urandom % (room - 1)));
        br_target = pc_t'(int'(m_pc[m_sp]) + int'($urandom % (int'(br_rpc) - int'(m_pc[m_sp]) + 1)));
        case ($urandom % 3)
          0: br_taken = '1;
          1: br_taken = '0;
          default: br_taken = wmask_t'($urandom);
        endcase
      end else if (valid && $urandom % 3 != 0) begin
        advance = 1;
      end
      @(posedge clk);
      // model update, same priority as the stack: branch, pop, advance
      t = br_taken & m_mask[m_sp]; n = m_mask[m_sp] & ~br_taken;
      if (br_valid) begin
        if (t != 0 && n == 0) m_pc[m_sp] = br_target;
        else if (t != 0) begin
          m_pc[m_sp+1] = m_pc[m_sp]; m_rpc[m_sp+1] = br_rpc; m_mask[m_sp+1] = n;
          m_pc[m_sp+2] = br_target;  m_rpc[m_sp+2] = br_rpc; m_mask[m_sp+2] = t;
          m_pc[m_sp] = br_rpc; m_sp += 2; pushes++;
          if (m_sp > maxsp) maxsp = m_sp;
        end
      end else if (at_rpc) begin m_sp--; pops++; end
      else if (advance) m_pc[m_sp]++;
    end
    init = 0; advance = 0; br_valid = 0; br_pending = 0;
    check(!overflow, "random: no overflow");
    check(pushes > 100 && pops > 100 && maxsp >= 6, "random: deep nesting reached");
    $display("random phase: %0d divergent branches, %0d pops, max depth %0d", pushes, pops, maxsp);
  endtask

  initial begin
    init = 0; advance = 0; br_pending = 0; br_valid = 0; init_mask = 0; br_taken = 0;
    init_pc = 0; br_target = 0; br_rpc = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); init = 1; init_mask = 32'hFFFF_FFFF; init_pc = 0;
    @(negedge clk); init = 0;
    check(pc == 0 && mask == '1 && depth == 0, "launch state");
    step(3);                                   // pc 3 (branch fetched at 2)
    branch(32'hFFFF_FFFF, 10, 20);             // uniform taken
    check(pc == 10 && depth == 0, "uniform branch jumps");
    step(1);                                   // pc 11
    branch(32'h0, 30, 40);                     // uniform not taken
    check(pc == 11 && depth == 0, "uniform not-taken falls through");
    // divergent: branch at 11 -> taken 15, reconverge 18
    branch(32'h0000_FFFF, 15, 18);
    check(depth == 2 && pc == 15 && mask == 32'h0000_FFFF, "taken path on top");
    step(1);                                   // pc 16
    // nested divergence inside the taken path: branch at 15 -> 17, rpc 17
    br_pending = 1; step(0);
    branch(32'h0000_00FF, 17, 17);
    br_pending = 0;
    @(negedge clk);
    // inner taken path starts at its rpc and pops immediately
    @(negedge clk);
    check(depth == 3 && pc == 16 && mask == 32'h0000_FF00, "inner not-taken path");
    step(1);                                   // pc 17 == rpc -> pop
    @(negedge clk);
    check(depth == 2 && pc == 17 && mask == 32'h0000_FFFF, "inner reconvergence");
    step(1);                                   // pc 18 == rpc -> pop
    @(negedge clk);
    check(depth == 1 && pc == 11 && mask == 32'hFFFF_0000, "outer not-taken path");
    step(7);                                   // reach 18
    @(negedge clk);
    check(depth == 0 && pc == 18 && mask == 32'hFFFF_FFFF, "outer reconvergence");
    // no pop while a branch is pending: the taken path starts at its rpc
    br_pending = 1;
    branch(32'h0000_000F, 19, 19);
    @(negedge clk);
    check(depth == 2 && !valid == 0, "held while pending");
    br_pending = 0;
    @(negedge clk);
    check(depth == 1 && pc == 18 && mask == 32'hFFFF_FFF0, "pops after release");
    // deeper nesting
    branch(32'h0000_0030, 40, 50);
    branch(32'h0000_0010, 60, 70);
    check(depth == 5 && pc == 60 && mask == 32'h0000_0010, "depth 5");
    branch(32'h0000_0010, 80, 90);             // single thread: uniform, no push
    check(depth == 5 && pc == 80, "uniform inside nest");
    @(negedge clk);
    random_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
