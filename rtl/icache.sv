// icache: the core's instruction store, read by the fetch unit.
//
// The document keeps instruction fetch and the 4 KB L1 instruction cache of a
// conventional GPU core unchanged and does not describe them. Here the whole
// kernel is held on chip: 4 KB of 64-bit instruction words (512 entries),
// written by the host before launch, so a fetch never misses (this design's
// simplification; no refill path or tags). One synchronous read port: the
// word addressed in one cycle appears on rd_data in the next.
module icache
  import tsimt_pkg::*;
#(
  parameter int unsigned WORDS = IMEM_WORDS
) (
  input  logic   clk,
  input  logic   wr_en,
  input  pc_t    wr_addr,
  input  instr_t wr_data,
  input  logic   rd_en,
  input  pc_t    rd_addr,
  output instr_t rd_data
);
  instr_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
