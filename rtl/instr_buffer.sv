// instr_buffer: the instruction buffer (IB) of the core front end.
//
// As in the document, the IB has a dedicated slot for every warp. A slot holds
// one decoded instruction together with the active mask of the path it was
// fetched on (the mask is captured at fetch time because the reconvergence
// stack may pop before the instruction issues). The fetch unit fills at most
// one slot per cycle; the warp scheduler empties the slot of the warp it
// issues. `flush` empties all slots at kernel launch. A slot that is filled
// and issued in the same cycle cannot occur (a fill only targets an empty
// slot), which is asserted.
module instr_buffer
  import tsimt_pkg::*;
#(
  parameter int unsigned NW = MAX_WARPS
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   flush,
  input  logic   fill_valid,
  input  wid_t   fill_warp,
  input  instr_t fill_instr,
  input  wmask_t fill_mask,
  input  logic   issue_valid,
  input  wid_t   issue_warp,
  output logic   [NW-1:0] valid,
  output instr_t instr [NW],
  output wmask_t mask  [NW]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (flush) begin
      valid <= '0;
    end else begin
      if (issue_valid) valid[issue_warp] <= 1'b0;
      if (fill_valid)  valid[fill_warp]  <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (fill_valid) begin
      instr[fill_warp] <= fill_instr;
      mask[fill_warp]  <= fill_mask;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   fill_valid |-> !valid[fill_warp])
    else $error("instr_buffer: fill of an occupied slot");
endmodule
