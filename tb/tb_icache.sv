// tb_icache: writes all 512 instruction words and reads them back in random
// order, checking the one-cycle read latency and that a read with rd_en low
// keeps the previous output.
module tb_icache;
  import tsimt_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en, rd_en; pc_t wr_addr, rd_addr; instr_t wr_data, rd_data;
  icache dut (.*);
  int checks = 0, failures = 0;
  instr_t refm [IMEM_WORDS];
  initial begin
    pc_t a;
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = '0;
    for (int i = 0; i < IMEM_WORDS; i++) begin
      @(negedge clk); wr_en = 1; wr_addr = pc_t'(i);
      wr_data = {$urandom, $urandom}; refm[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 2000; i++) begin
      a = pc_t'($urandom);
      @(negedge clk); rd_en = 1; rd_addr = a;
      @(negedge clk); rd_en = 0; rd_addr = a + 1;
      checks++; if (rd_data !== refm[a]) begin failures++; $display("FAIL: read %0d", a); end
      @(negedge clk);
      checks++; if (rd_data !== refm[a]) begin failures++; $display("FAIL: hold %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
