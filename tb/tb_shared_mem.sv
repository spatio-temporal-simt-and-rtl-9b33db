// tb_shared_mem: checks the banked shared memory against a reference array.
// Random load/store requests on all 8 ports are arbitrated; the test checks
// that every bank serves at most one port, that the arbiter is work-conserving
// (a refused port's bank was given to another port), that stores land and that
// granted loads return the reference value one cycle later. A same-bank pattern
// (stride 32) must serialise, and the host port must win over the lanes.
module tb_shared_mem;
  import tsimt_pkg::*;
  localparam int NPORT = 8, BANKS = 32, BYTES = 65536, WORDS = BYTES / 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NPORT-1:0] req, we, gnt, rvalid;
  word_t addr [NPORT], wdata [NPORT], rdata [NPORT];
  logic h_en, h_we; word_t h_addr, h_wdata, h_rdata; logic [7:0] conflicts;
  shared_mem #(.NPORT(NPORT), .BANKS(BANKS), .BYTES(BYTES)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  word_t refm [WORDS];
  word_t exp_rd [NPORT];
  logic [NPORT-1:0] exp_rv;

  initial begin
    int used [BANKS]; int b; int nserved;
    req = 0; we = 0; h_en = 0; h_we = 0; h_addr = 0; h_wdata = 0;
    for (int p = 0; p < NPORT; p++) begin addr[p] = 0; wdata[p] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    // initialise a 1024-word window through the host port
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); h_en = 1; h_we = 1; h_addr = i; h_wdata = $urandom; refm[i] = h_wdata;
    end
    @(negedge clk); h_en = 0;
    exp_rv = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      for (int p = 0; p < NPORT; p++) begin
        req[p] = ($urandom % 3) != 0;
        we[p]  = ($urandom % 2) != 0;
        addr[p] = (cyc % 5 == 0) ? word_t'((p * 32 + cyc) % 1024) : word_t'($urandom % 1024);
        wdata[p] = $urandom;
      end
      #1;
      // data of last cycle's loads
      for (int p = 0; p < NPORT; p++)
        if (exp_rv[p]) check(rvalid[p] && rdata[p] == exp_rd[p], "load data");
      for (int i = 0; i < BANKS; i++) used[i] = 0;
      nserved = 0;
      for (int p = 0; p < NPORT; p++) if (gnt[p]) begin
        check(req[p], "grant only on request");
        used[addr[p] % BANKS]++;
        nserved++;
      end
      for (int i = 0; i < BANKS; i++) check(used[i] <= 1, "one access per bank");
      for (int p = 0; p < NPORT; p++)
        if (req[p] && !gnt[p]) check(used[addr[p] % BANKS] == 1, "work conserving");
      check(int'(conflicts) == $countones(req) - nserved, "conflict count");
      // update reference at the edge
      exp_rv = 0;
      for (int p = 0; p < NPORT; p++) if (gnt[p] && !we[p]) begin
        exp_rv[p] = 1; exp_rd[p] = refm[addr[p]];
      end
      for (int p = 0; p < NPORT; p++) if (gnt[p] && we[p]) refm[addr[p]] = wdata[p];
      @(negedge clk);
    end
    req = 0;
    // host priority: the host takes bank 3 away from port 0
    @(negedge clk);
    req = 8'h01; we = 0; addr[0] = 3; h_en = 1; h_we = 0; h_addr = 35;
    #1 check(!gnt[0], "host wins its bank");
    @(negedge clk); h_en = 0; req = 0;
    #1 check(h_rdata == refm[35], "host read data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
