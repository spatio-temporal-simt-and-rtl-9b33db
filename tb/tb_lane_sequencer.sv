// tb_lane_sequencer: checks group sequencing with compaction.
// Random active masks are loaded; the test expects exactly the non-empty
// 4-thread groups in ascending order, one per cycle, with the right thread
// masks and `last` flag, back-to-back loads without a bubble, and scalar
// instructions reduced to the lowest active thread.
module tb_lane_sequencer;
  import tsimt_pkg::*;
  localparam int LW = 4, G = WARP_SIZE / LW;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load, load_scalar, advance, ready, valid, last;
  wmask_t load_mask;
  logic [7:0] group;
  logic [LW-1:0] tmask;
  lane_sequencer #(.LW(LW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic run_one(input wmask_t m, input bit sc);
    wmask_t em; int exp_groups [$]; int cyc;
    em = m;
    if (sc) begin
      em = '0;
      for (int t = 31; t >= 0; t--) if (m[t]) em = wmask_t'(1) << t;
    end
    for (int g = 0; g < G; g++) if (em[g*LW +: LW] != 0) exp_groups.push_back(g);
    @(negedge clk);
    check(ready, "ready before load");
    load = 1; load_mask = m; load_scalar = sc; advance = 0;
    @(negedge clk);
    load = 0;
    cyc = 0;
    foreach (exp_groups[i]) begin
      check(valid, "valid while groups remain");
      check(group == 8'(exp_groups[i]), $sformatf("group %0d exp %0d", group, exp_groups[i]));
      check(tmask == em[exp_groups[i]*LW +: LW], "thread mask");
      check(last == (i == exp_groups.size() - 1), "last flag");
      advance = 1;
      #1;
      if (i == exp_groups.size() - 1) check(ready, "ready in the last cycle");
      @(negedge clk);
      cyc++;
      advance = 0;
    end
    check(!valid, "idle after last group");
    check(cyc == exp_groups.size(), "one cycle per active group");
  endtask

  initial begin
    load = 0; load_scalar = 0; advance = 0; load_mask = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    run_one(32'hFFFF_FFFF, 0);
    run_one(32'h0000_F00F, 0);
    run_one(32'h8000_0001, 0);
    run_one(32'h0000_0300, 1);
    for (int i = 0; i < 200; i++) begin
      wmask_t m = $urandom;
      if (i % 3 == 0) m = m & $urandom & $urandom;
      if (m == 0) m = 32'h10;
      run_one(m, (i % 7) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
