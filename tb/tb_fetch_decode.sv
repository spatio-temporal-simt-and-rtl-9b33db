// tb_fetch_decode: the fetch unit with a model I-cache, stacks and IB.
// Four warps run a 10-word program (a BRA at PC 5, EXIT at PC 9). The test
// checks that each fill carries the word at the PC that was fetched and the
// mask of that moment, that a warp is never fetched while its IB slot is full
// or a fetch is in flight, that fetching stops after a BRA until the branch is
// cleared and for good after EXIT, and that every warp reaches its EXIT.
module tb_fetch_decode;
  import tsimt_pkg::*;
  localparam int NW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush; logic [NW-1:0] warp_active, stk_valid, ib_valid, br_clear;
  pc_t stk_pc [NW]; wmask_t stk_mask [NW];
  logic ic_rd_en; pc_t ic_rd_addr; instr_t ic_rd_data;
  logic [NW-1:0] advance, br_pending, stk_hold, stopped;
  logic fill_valid; wid_t fill_warp; instr_t fill_instr; wmask_t fill_mask;
  fetch_decode #(.NW(NW)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL at %0t: %s", $time, s); end
  endtask

  function automatic instr_t word_at(int pc);
    if (pc == 5) return mk_bra(0, 0, 1, 0, 7, 8);
    if (pc == 9) return mk_alu(OP_EXIT, 0, 0, 0, 0, 0, 0, 0, 0, 0);
    return mk_alu(OP_ADD, 0, 0, 1, 0, 2, 0, 3, 1, pc);
  endfunction

  // model I-cache (one-cycle read)
  always_ff @(posedge clk) if (ic_rd_en) ic_rd_data <= word_at(int'(ic_rd_addr));

  int pend_pc [NW]; wmask_t pend_mask [NW]; bit inflight [NW];
  int brwait [NW]; int exits = 0;
  bit f_v, f_exit, f_br; wid_t f_w; bit mpend [NW];

  initial begin
    flush = 0; warp_active = '1; stk_valid = '1; ib_valid = 0; br_clear = 0;
    for (int w = 0; w < NW; w++) begin stk_pc[w] = 0; stk_mask[w] = 32'h1 << w; inflight[w] = 0; mpend[w] = 0; brwait[w] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      br_clear = 0;
      for (int w = 0; w < NW; w++)
        if (mpend[w] && !ib_valid[w]) begin
          brwait[w]++;
          if (brwait[w] == 3) begin br_clear[w] = 1; brwait[w] = 0; stk_pc[w] = 7; end
        end
      #1;
      for (int w = 0; w < NW; w++) if (advance[w]) begin
        check(!ib_valid[w] && !inflight[w], "fetch only into an empty slot");
        check(!mpend[w] && !stopped[w], "no fetch while a branch is unresolved or after EXIT");
        check(ic_rd_addr == stk_pc[w], "fetch address is the stack PC");
      end
      if (fill_valid) begin
        check(inflight[fill_warp], "fill follows a fetch");
        check(fill_instr == word_at(pend_pc[fill_warp]), "fill carries the fetched word");
        check(fill_mask == pend_mask[fill_warp], "fill carries the fetch-time mask");
      end
      for (int w = 0; w < NW; w++) check(br_pending[w] == mpend[w], "branch-pending flag");
      f_v = fill_valid; f_w = fill_warp; f_exit = fill_instr.op == OP_EXIT; f_br = fill_instr.op == OP_BRA;
      @(posedge clk); #1;
      // model: IB, stack PC, issue
      for (int w = 0; w < NW; w++) if (ib_valid[w] && ($urandom % 3 == 0)) ib_valid[w] = 0;
      for (int w = 0; w < NW; w++) if (br_clear[w]) mpend[w] = 0;
      if (f_v) begin
        inflight[f_w] = 0; ib_valid[f_w] = 1;
        if (f_exit) exits++;
        if (f_br) mpend[f_w] = 1;
      end
    end
    check(exits == NW, "every warp fetched its EXIT");
    check(stopped == '1, "all warps stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // record each fetch just before the edge that performs it
  always @(posedge clk) begin
    for (int w = 0; w < NW; w++) if (rst_n && advance[w]) begin
      inflight[w] <= 1; pend_pc[w] <= int'(stk_pc[w]); pend_mask[w] <= stk_mask[w];
      stk_pc[w] <= stk_pc[w] + 1; stk_mask[w] <= stk_mask[w] ^ 32'hF0;
    end
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
