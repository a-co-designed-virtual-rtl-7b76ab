// jtlt: Jump Target-address Lookup Table.
//
// A hardware cache of the translator's dispatch table: each entry pairs a
// source-binary PC (SPC) with the translated code-cache PC (TPC) of the
// superblock that starts there. A register-indirect jump holds an SPC; the
// table turns it into a TPC without running the software dispatch code. Like a
// software-managed TLB it is filled only by software (here the JTLT-write
// instruction, applied at retirement), so a hit is always correct; a miss
// sends fetch to the dispatch code.
//
// Organisation (this design's choice; only the entry count is given):
// direct-mapped, indexed by SPC[IDXW+1:2] (4-byte source instructions), with
// the full SPC kept as tag. Lookup is combinational; a write takes effect on
// the next clock edge. Reset invalidates all entries.
module jtlt
  import ildp_pkg::*;
#(
  parameter int ENTRIES = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  // lookup
  input  word_t lk_spc,
  output logic  lk_hit,
  output word_t lk_tpc,
  // software fill
  input  logic  wr_en,
  input  word_t wr_spc,
  input  word_t wr_tpc
);
  localparam int IDXW = $clog2(ENTRIES);

  logic [ENTRIES-1:0] vld;
  word_t              tag [ENTRIES];
  word_t              tpc [ENTRIES];

  logic [IDXW-1:0] lk_idx, wr_idx;
  assign lk_idx = lk_spc[IDXW+1:2];
  assign wr_idx = wr_spc[IDXW+1:2];

  assign lk_hit = vld[lk_idx] && (tag[lk_idx] == lk_spc);
  assign lk_tpc = tpc[lk_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else if (wr_en) vld[wr_idx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      tag[wr_idx] <= wr_spc;
      tpc[wr_idx] <= wr_tpc;
    end
  end
endmodule
