// tb_warp_scheduler: random ready patterns against the issue rules.
// Each cycle at most one warp issues; it must have a full IB slot, a clear
// scoreboard and a ready lane, and it must go to lane (warp mod NLANES). The
// scheduler must issue whenever some warp is issuable, report as conflicts the
// lanes left waiting, and, being round-robin, serve a permanently issuable
// warp within NW cycles.
module tb_warp_scheduler;
  import tsimt_pkg::*;
  localparam int NW = 32, NL = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NW-1:0] ib_valid, sb_ready; logic [NL-1:0] lane_ready, issue_lane;
  logic issue_valid; wid_t issue_warp; logic [7:0] conflicts;
  warp_scheduler #(.NW(NW), .NLANES(NL)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    int wait_cnt; bit any; int lanes_with;
    logic [NL-1:0] has;
    ib_valid = 0; sb_ready = 0; lane_ready = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    wait_cnt = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      ib_valid = $urandom; sb_ready = $urandom; lane_ready = NL'($urandom);
      ib_valid[5] = 1; sb_ready[5] = 1; lane_ready[5 % NL] = 1;   // warp 5 always issuable
      #1;
      any = 0; has = 0;
      for (int w = 0; w < NW; w++)
        if (ib_valid[w] && sb_ready[w] && lane_ready[w % NL]) begin any = 1; has[w % NL] = 1; end
      check(issue_valid == any, "issues when something is issuable");
      if (issue_valid) begin
        check(ib_valid[issue_warp] && sb_ready[issue_warp] && lane_ready[issue_warp % NL], "issued warp is issuable");
        check(issue_lane == NL'(1) << (issue_warp % NL), "lane of the warp");
      end
      lanes_with = $countones(has);
      check(int'(conflicts) == lanes_with - (issue_valid ? 1 : 0), "conflict count");
      if (issue_valid && issue_warp == 5) wait_cnt = 0; else wait_cnt++;
      check(wait_cnt <= NW, "round-robin fairness");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
