// warp_scheduler: the single warp scheduler (WS) of the TSIMT core.
//
// Following the document, one scheduler serves the whole core and issues at
// most one warp instruction per cycle. A warp is locked to one lane (warp w to
// lane w mod NLANES), so an instruction is issuable when its IB slot is full,
// the scoreboard reports its registers free, and its lane is ready for a new
// instruction word. Among issuable warps the scheduler picks round-robin,
// starting after the last issued warp (the selection policy is this design's
// choice). `conflicts` counts the lanes that could have accepted an
// issuable instruction in this cycle but were not served because the single
// issue port went elsewhere: the document's "issue conflicts" statistic.
// Purely combinational except for the round-robin pointer.
module warp_scheduler
  import tsimt_pkg::*;
#(
  parameter int unsigned NW     = MAX_WARPS,
  parameter int unsigned NLANES = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   [NW-1:0]     ib_valid,
  input  logic   [NW-1:0]     sb_ready,
  input  logic   [NLANES-1:0] lane_ready,
  output logic   issue_valid,
  output wid_t   issue_warp,
  output logic   [NLANES-1:0] issue_lane,
  output logic   [7:0]        conflicts
);
  logic [NW-1:0]     issuable;
  logic [NLANES-1:0] lane_has;
  wid_t              rr_q;

  always_comb begin
    lane_has = '0;
    for (int w = 0; w < NW; w++) begin
      issuable[w] = ib_valid[w] && sb_ready[w] && lane_ready[w % NLANES];
      if (issuable[w]) lane_has[w % NLANES] = 1'b1;
    end
    issue_valid = 1'b0;
    issue_warp  = '0;
    for (int i = NW - 1; i >= 0; i--) begin
      automatic int w = (int'(rr_q) + i) % NW;
      if (issuable[w]) begin issue_valid = 1'b1; issue_warp = wid_t'(w); end
    end
    issue_lane = '0;
    if (issue_valid) issue_lane[int'(issue_warp) % NLANES] = 1'b1;
    conflicts = '0;
    for (int l = 0; l < NLANES; l++) conflicts = conflicts + 8'(lane_has[l]);
    if (issue_valid) conflicts = conflicts - 8'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr_q <= '0;
    else if (issue_valid) rr_q <= wid_t'((int'(issue_warp) + 1) % NW);
  end
endmodule
