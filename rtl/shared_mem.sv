// shared_mem: the core's banked shared memory (scratchpad).
//
// As the document describes, every lane presents its shared-memory addresses
// on its own ports, the addresses are checked for bank conflicts, and a
// crossbar connects the SRAM banks to the lane ports. In a temporal-SIMT core
// the threads of one warp use consecutive cycles, so conflicts arise between
// warps on different lanes (and, in STSIMT, between the LW threads a lane
// presents together). Size (64 KB) follows the evaluated configuration; the
// bank count (32 word-interleaved banks, bank = word address mod BANKS) and
// the arbitration are this design's choices: each bank serves one port per
// cycle, the port search starts at a pointer that rotates every cycle so no
// lane starves, and ports that lose simply retry. Addresses wrap modulo the
// memory size.
//
// Timing: gnt is combinational in the request cycle; a granted store is
// written at the clock edge, a granted load returns rdata with rvalid in the
// next cycle. The host port (loading inputs, reading results) has priority over
// all lanes and returns h_rdata one cycle after h_en.
module shared_mem
  import tsimt_pkg::*;
#(
  parameter int unsigned NPORT = 8,
  parameter int unsigned BANKS = 32,
  parameter int unsigned BYTES = 65536
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NPORT-1:0] req,
  input  logic [NPORT-1:0] we,
  input  word_t            addr   [NPORT],
  input  word_t            wdata  [NPORT],
  output logic [NPORT-1:0] gnt,
  output logic [NPORT-1:0] rvalid,
  output word_t            rdata  [NPORT],
  input  logic             h_en,
  input  logic             h_we,
  input  word_t            h_addr,
  input  word_t            h_wdata,
  output word_t            h_rdata,
  output logic [7:0]       conflicts
);
  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned ROWS  = WORDS / BANKS;
  localparam int unsigned BW    = $clog2(BANKS);
  localparam int unsigned RW_   = $clog2(ROWS);
  localparam int unsigned PW    = (NPORT > 1) ? $clog2(NPORT) : 1;

  logic [PW-1:0] rr_q;

  function automatic logic [BW-1:0] bank_of(word_t a);
    return BW'(a % BANKS);
  endfunction
  function automatic logic [RW_-1:0] row_of(word_t a);
    return RW_'((a / BANKS) % ROWS);
  endfunction

  // per-bank arbitration
  logic          b_en   [BANKS];
  logic          b_we   [BANKS];
  logic [RW_-1:0] b_row [BANKS];
  word_t         b_wd   [BANKS];

  always_comb begin
    gnt = '0;
    for (int b = 0; b < BANKS; b++) begin
      b_en[b] = 1'b0; b_we[b] = 1'b0; b_row[b] = '0; b_wd[b] = '0;
      if (h_en && bank_of(h_addr) == BW'(b)) begin
        b_en[b] = 1'b1; b_we[b] = h_we; b_row[b] = row_of(h_addr);
        b_wd[b] = h_wdata;
      end
      for (int i = 0; i < NPORT; i++) begin
        automatic int p = (int'(rr_q) + i) % NPORT;
        if (!b_en[b] && req[p] && bank_of(addr[p]) == BW'(b)) begin
          b_en[b] = 1'b1; b_we[b] = we[p]; b_row[b] = row_of(addr[p]);
          b_wd[b] = wdata[p]; gnt[p] = 1'b1;
        end
      end
    end
    conflicts = '0;
    for (int p = 0; p < NPORT; p++) conflicts = conflicts + 8'(req[p] && !gnt[p]);
  end

  word_t bank_q [BANKS];
  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    word_t mem [ROWS];
    always_ff @(posedge clk) begin
      if (b_en[b]) begin
        if (b_we[b]) mem[b_row[b]] <= b_wd[b];
        else         bank_q[b] <= mem[b_row[b]];
      end
    end
  end

  logic [BW-1:0] pbank_q [NPORT];
  logic [BW-1:0] hbank_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q   <= '0;
      rvalid <= '0;
    end else begin
      rr_q <= PW'((int'(rr_q) + 1) % NPORT);
      for (int p = 0; p < NPORT; p++) rvalid[p] <= gnt[p] && !we[p];
    end
  end
  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORT; p++) pbank_q[p] <= bank_of(addr[p]);
    hbank_q <= bank_of(h_addr);
  end

  always_comb begin
    for (int p = 0; p < NPORT; p++) rdata[p] = bank_q[pbank_q[p]];
    h_rdata = bank_q[hbank_q];
  end

endmodule
