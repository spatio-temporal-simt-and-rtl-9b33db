// tb_lane_regfile: checks the banked lane register file.
// Vector registers of several warps and thread groups are written with
// partial thread masks and read back through both ports; scalar registers are
// written and must read back broadcast to every slot without disturbing vector
// data. Bank arbitration is checked against the documented interleave
// (bank = (entry + entry/NB) mod NB): a write blocks reads of its bank, and two
// reads of different entries in one bank let only port 0 through.
module tb_lane_regfile;
  import tsimt_pkg::*;
  localparam int LW = 4, NB = 8, DEPTH = 2048, G = WARP_SIZE / LW;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [6:0] cfg_nv = 9, cfg_ns = 3;
  logic [1:0] rd_req, rd_scalar, rd_gnt, rd_valid;
  reg_t rd_reg [2]; logic [7:0] rd_group [2], rd_lw [2];
  word_t rd_data [2][LW];
  logic wr_en, wr_scalar; reg_t wr_reg; logic [7:0] wr_group, wr_lw;
  word_t wr_data [LW]; logic [LW-1:0] wr_mask; logic bank_conflict;
  lane_regfile #(.LW(LW), .NB(NB), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  word_t vref [16][9][G][LW];
  word_t sref [16][3];

  function automatic int bank_v(int w, int r, int g);
    int e = (w * 9 + r) * G + g; return (e + e / NB) % NB;
  endfunction

  task automatic wr(input bit sc, input int w, input int r, input int g,
                    input logic [LW-1:0] m, input word_t d [LW]);
    @(negedge clk);
    wr_en = 1; wr_scalar = sc; wr_lw = 8'(w); wr_reg = reg_t'(r); wr_group = 8'(g);
    wr_mask = m; wr_data = d; rd_req = 0;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic rd2(input bit s0, input int w0, input int r0, input int g0,
                     input bit s1, input int w1, input int r1, input int g1,
                     output logic [1:0] gnt);
    @(negedge clk);
    rd_req = 2'b11; rd_scalar = {s1, s0};
    rd_lw[0] = 8'(w0); rd_reg[0] = reg_t'(r0); rd_group[0] = 8'(g0);
    rd_lw[1] = 8'(w1); rd_reg[1] = reg_t'(r1); rd_group[1] = 8'(g1);
    #1 gnt = rd_gnt;
    @(negedge clk); rd_req = 0;
  endtask

  initial begin
    word_t d [LW]; logic [1:0] g; logic [LW-1:0] m;
    int w, r, gr, w2, r2, g2;
    rd_req = 0; rd_scalar = 0; wr_en = 0; wr_scalar = 0; wr_mask = 0;
    for (int k = 0; k < LW; k++) wr_data[k] = 0;
    for (int p = 0; p < 2; p++) begin rd_reg[p] = 0; rd_group[p] = 0; rd_lw[p] = 0; end
    // fill every vector register of 16 warps with full masks
    for (int wi = 0; wi < 16; wi++) for (int ri = 0; ri < 9; ri++) for (int gi = 0; gi < G; gi++) begin
      for (int k = 0; k < LW; k++) begin d[k] = $urandom; vref[wi][ri][gi][k] = d[k]; end
      wr(0, wi, ri, gi, '1, d);
    end
    for (int wi = 0; wi < 16; wi++) for (int si = 0; si < 3; si++) begin
      for (int k = 0; k < LW; k++) d[k] = $urandom;
      m = LW'(1) << (si % LW);
      sref[wi][si] = d[si % LW];
      wr(1, wi, si, 0, m, d);
    end
    // partial-mask overwrites
    for (int i = 0; i < 200; i++) begin
      w = $urandom % 16; r = $urandom % 9; gr = $urandom % G; m = LW'($urandom);
      for (int k = 0; k < LW; k++) begin d[k] = $urandom; if (m[k]) vref[w][r][gr][k] = d[k]; end
      wr(0, w, r, gr, m, d);
    end
    // read back pairs
    for (int i = 0; i < 600; i++) begin
      w = $urandom % 16; r = $urandom % 9; gr = $urandom % G;
      w2 = $urandom % 16; r2 = $urandom % 9; g2 = $urandom % G;
      if (i % 4 == 0) begin
        rd2(0, w, r, gr, 1, w2, r2 % 3, 0, g);
        check(g[0], "port 0 always granted without a write");
        if (g[1]) for (int k = 0; k < LW; k++)
          check(rd_data[1][k] == sref[w2][r2 % 3], "scalar broadcast");
      end else begin
        rd2(0, w, r, gr, 0, w2, r2, g2, g);
        check(g[0], "port 0 always granted without a write");
        check(g[1] == !((bank_v(w, r, gr) == bank_v(w2, r2, g2)) &&
                        !(w == w2 && r == r2 && gr == g2)),
              "port 1 grant follows the bank interleave");
        if (g[1]) for (int k = 0; k < LW; k++)
          check(rd_data[1][k] == vref[w2][r2][g2][k], "vector read port 1");
      end
      for (int k = 0; k < LW; k++)
        check(rd_data[0][k] == vref[w][r][gr][k], $sformatf("vector read w%0d r%0d g%0d", w, r, gr));
    end
    // a write blocks a read of the same bank
    @(negedge clk);
    wr_en = 1; wr_scalar = 0; wr_lw = 0; wr_reg = 0; wr_group = 0; wr_mask = '0;
    rd_req = 2'b01; rd_scalar = 0; rd_lw[0] = 0; rd_reg[0] = 8; rd_group[0] = 0;
    #1 check(!rd_gnt[0] && bank_conflict, "write has priority on its bank");
    rd_reg[0] = 1;
    #1 check(rd_gnt[0] && !bank_conflict, "other bank is free");
    @(negedge clk); wr_en = 0; rd_req = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
