// tb_scoreboard: random issue/release traffic against a reference set of
// pending registers. Each cycle the ready flag of every warp's buffered
// instruction must equal "no source and no destination pending", with vector
// and scalar register spaces kept apart.
module tb_scoreboard;
  import tsimt_pkg::*;
  localparam int NW = 32, NL = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush, set_valid; wid_t set_warp; instr_t set_instr;
  logic [NL-1:0] clr_valid; wid_t clr_warp [NL]; instr_t clr_instr [NL];
  instr_t ib_instr [NW]; logic [NW-1:0] ready;
  scoreboard #(.NW(NW), .NLANES(NL)) dut (.*);
  int checks = 0, failures = 0;
  bit vp [NW][64], sp [NW][64];

  function automatic instr_t rnd_instr();
    instr_t i;
    i = mk_alu(op_e'(1 + $urandom % 16), 0, $urandom % 2, $urandom % 8,
               $urandom % 2, $urandom % 8, $urandom % 2, $urandom % 8, $urandom % 2, 0);
    return i;
  endfunction
  function automatic bit pend(int w, bit s, int r);
    return s ? sp[w][r] : vp[w][r];
  endfunction

  initial begin
    flush = 0; set_valid = 0; set_warp = 0; set_instr = '0; clr_valid = 0;
    for (int l = 0; l < NL; l++) begin clr_warp[l] = 0; clr_instr[l] = '0; end
    for (int w = 0; w < NW; w++) ib_instr[w] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int w = 0; w < NW; w++) ib_instr[w] = rnd_instr();
      set_valid = $urandom % 2; set_warp = wid_t'($urandom % 4); set_instr = rnd_instr();
      for (int l = 0; l < NL; l++) begin
        clr_valid[l] = $urandom % 2; clr_warp[l] = wid_t'($urandom % 4); clr_instr[l] = rnd_instr();
      end
      #1;
      for (int w = 0; w < NW; w++) begin
        automatic bit exp = 1;
        if (uses_src0(ib_instr[w]) && pend(w, ib_instr[w].src0_s, ib_instr[w].src0)) exp = 0;
        if (uses_src1(ib_instr[w]) && pend(w, ib_instr[w].src1_s, ib_instr[w].src1)) exp = 0;
        if (writes_dst(ib_instr[w]) && pend(w, ib_instr[w].dst_s, ib_instr[w].dst)) exp = 0;
        checks++;
        if (ready[w] != exp) begin failures++; $display("FAIL: ready[%0d]", w); end
      end
      for (int l = 0; l < NL; l++) if (clr_valid[l] && writes_dst(clr_instr[l])) begin
        if (clr_instr[l].dst_s) sp[clr_warp[l]][clr_instr[l].dst] = 0;
        else vp[clr_warp[l]][clr_instr[l].dst] = 0;
      end
      if (set_valid && writes_dst(set_instr)) begin
        if (set_instr.dst_s) sp[set_warp][set_instr.dst] = 1;
        else vp[set_warp][set_instr.dst] = 1;
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
