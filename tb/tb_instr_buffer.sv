// tb_instr_buffer: random fills of empty slots and issues of full slots
// against a reference; each slot must hold the instruction and mask it was
// filled with until it is issued, and flush must empty every slot.
module tb_instr_buffer;
  import tsimt_pkg::*;
  localparam int NW = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush, fill_valid, issue_valid; wid_t fill_warp, issue_warp;
  instr_t fill_instr; wmask_t fill_mask;
  logic [NW-1:0] valid; instr_t instr [NW]; wmask_t mask [NW];
  instr_buffer #(.NW(NW)) dut (.*);
  int checks = 0, failures = 0;
  bit rv [NW]; instr_t ri [NW]; wmask_t rm [NW];
  initial begin
    flush = 0; fill_valid = 0; issue_valid = 0; fill_warp = 0; issue_warp = 0;
    fill_instr = '0; fill_mask = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      fill_warp = wid_t'($urandom); fill_valid = !rv[fill_warp] && ($urandom % 2);
      fill_instr = {$urandom, $urandom}; fill_mask = $urandom;
      issue_warp = wid_t'($urandom); issue_valid = rv[issue_warp] && issue_warp != fill_warp;
      flush = (cyc % 700 == 699);
      @(posedge clk); #1;
      if (flush) for (int w = 0; w < NW; w++) rv[w] = 0;
      else begin
        if (issue_valid) rv[issue_warp] = 0;
        if (fill_valid) begin rv[fill_warp] = 1; ri[fill_warp] = fill_instr; rm[fill_warp] = fill_mask; end
      end
      for (int w = 0; w < NW; w++) begin
        checks++;
        if (valid[w] != rv[w] || (rv[w] && (instr[w] != ri[w] || mask[w] != rm[w]))) begin
          failures++; $display("FAIL: slot %0d", w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
