// gpr_rename: GPR renaming for a dispatch group.
//
// Only GPRs are renamed; accumulators are renamed separately by the steering
// logic. An instruction whose value is used by other strands (write kind
// "global") gets a fresh physical register; one whose GPR result is needed
// only for precise state writes the architected register file alone and
// allocates nothing. The map is looked up for up to W instructions per cycle
// with the dependences inside the group resolved in slot order.
//
// State: the speculative map (rename stage), the retirement map (updated as
// instructions retire) and a free bit per physical register. At retirement the
// register the instruction displaced is freed. A flush copies the retirement
// map, including this cycle's retirements, over the speculative map and marks
// free every register the retirement map does not hold. NPHYS = NGPR + ROB
// entries is this design's choice (the register count is not given).
// `ok` says whether enough registers are free for the whole group; the
// group is renamed only when `fire` is high.
module gpr_rename
  import ildp_pkg::*;
#(
  parameter int NPHYS = 192,
  parameter int W     = 4,
  parameter int RW    = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flush,
  // rename
  input  logic [W-1:0] in_valid,
  input  logic [W-1:0] in_reads,
  input  gpr_t         in_rs   [W],
  input  logic [W-1:0] in_alloc,
  input  gpr_t         in_rd   [W],
  output ptag_t        out_psrc [W],
  output ptag_t        out_pdst [W],
  output ptag_t        out_pold [W],
  output logic         ok,
  input  logic         fire,
  // retire
  input  logic [RW-1:0] rt_valid,
  input  gpr_t          rt_rd   [RW],
  input  ptag_t         rt_pdst [RW],
  input  ptag_t         rt_pold [RW]
);
  ptag_t            smap [NGPR];
  ptag_t            rmap [NGPR];
  ptag_t            rmap_nxt [NGPR];
  logic [NPHYS-1:0] free;

  // allocation: lowest free registers, one per allocating slot
  ptag_t        pick [W];
  logic [W-1:0] pick_ok;
  always_comb begin
    logic [NPHYS-1:0] f;
    f = free;
    for (int i = 0; i < W; i++) begin
      pick[i]    = '0;
      pick_ok[i] = 1'b0;
      for (int r = NPHYS-1; r >= 0; r--)
        if (f[r]) begin
          pick[i]    = ptag_t'(r);
          pick_ok[i] = 1'b1;
        end
      if (pick_ok[i]) f[pick[i]] = 1'b0;
    end
  end

  always_comb begin
    int n;
    ptag_t m [NGPR];
    m  = smap;
    n  = 0;
    ok = 1'b1;
    for (int i = 0; i < W; i++) begin
      out_psrc[i] = m[in_rs[i]];
      out_pold[i] = m[in_rd[i]];
      out_pdst[i] = '0;
      if (in_valid[i] && in_alloc[i]) begin
        if (!pick_ok[n]) ok = 1'b0;
        out_pdst[i] = pick[n];
        m[in_rd[i]] = pick[n];
        n++;
      end
    end
  end

  always_comb begin
    rmap_nxt = rmap;
    for (int i = 0; i < RW; i++)
      if (rt_valid[i]) rmap_nxt[rt_rd[i]] = rt_pdst[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < NGPR; g++) begin
        smap[g] <= ptag_t'(g);
        rmap[g] <= ptag_t'(g);
      end
      for (int r = 0; r < NPHYS; r++) free[r] <= (r >= NGPR);
    end else begin
      rmap <= rmap_nxt;
      if (flush) begin
        logic [NPHYS-1:0] used;
        used = '0;
        for (int g = 0; g < NGPR; g++) used[rmap_nxt[g]] = 1'b1;
        smap <= rmap_nxt;
        free <= ~used;
      end else begin
        logic [NPHYS-1:0] f;
        f = free;
        for (int i = 0; i < RW; i++)
          if (rt_valid[i]) f[rt_pold[i]] = 1'b1;
        if (fire) begin
          for (int i = 0; i < W; i++)
            if (in_valid[i] && in_alloc[i]) begin
              smap[in_rd[i]] <= out_pdst[i];
              f[out_pdst[i]] = 1'b0;
            end
        end
        free <= f;
      end
    end
  end
endmodule
