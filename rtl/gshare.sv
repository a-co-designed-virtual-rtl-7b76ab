// gshare: conditional branch direction predictor.
//
// A table of 2-bit saturating counters indexed by the branch TPC (in 16-bit
// parcels) XORed with the global history of branch outcomes. Size follows the
// evaluated configuration: 16K counters and 12 history bits. The history is
// kept twice (this design's choice for recovery): a speculative copy shifted
// at fetch with each predicted direction, and a committed copy shifted at
// retirement with the actual direction; a flush restores the speculative
// copy from the committed one. Counters are trained at retirement with the
// history the branch was predicted with. One prediction per cycle; counters
// reset to weakly not-taken.
module gshare
  import ildp_pkg::*;
#(
  parameter int ENTRIES = 16384,
  parameter int HIST    = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  // prediction
  input  word_t           pr_pc,
  output logic            pr_taken,
  output logic [HIST-1:0] pr_hist,     // history used, kept with the branch
  input  logic            pr_shift,    // a branch was predicted this cycle
  // training at retirement
  input  logic            up_en,
  input  word_t           up_pc,
  input  logic [HIST-1:0] up_hist,
  input  logic            up_taken,
  // recovery
  input  logic            restore
);
  localparam int IW = $clog2(ENTRIES);

  logic [1:0]      ctr [ENTRIES];
  logic [HIST-1:0] s_hist, c_hist, c_hist_nxt;

  function automatic logic [IW-1:0] idx(word_t pc, logic [HIST-1:0] h);
    return pc[IW:1] ^ IW'(h);
  endfunction

  assign pr_hist    = s_hist;
  assign pr_taken   = ctr[idx(pr_pc, s_hist)][1];
  assign c_hist_nxt = up_en ? {c_hist[HIST-2:0], up_taken} : c_hist;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_hist <= '0;
      c_hist <= '0;
    end else begin
      c_hist <= c_hist_nxt;
      if (restore)       s_hist <= c_hist_nxt;
      else if (pr_shift) s_hist <= {s_hist[HIST-2:0], pr_taken};
    end
  end

  logic [IW-1:0] ui;
  assign ui = idx(up_pc, up_hist);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ctr[i] <= 2'b01;
    end else if (up_en) begin
      if (up_taken && ctr[ui] != 2'b11)      ctr[ui] <= ctr[ui] + 2'd1;
      else if (!up_taken && ctr[ui] != 2'b00) ctr[ui] <= ctr[ui] - 2'd1;
    end
  end
endmodule
