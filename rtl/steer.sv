// steer: accumulator renaming and dependence-based steering.
//
// Each processing element (PE) owns one physical accumulator. A strand (a
// chain of instructions linked through one logical accumulator A0..A7) is
// sent whole to one PE, so its temporaries never leave that element. For each
// instruction of the dispatch group, in slot order:
//   - it reads its accumulator and the accumulator is mapped: it goes to the
//     PE that holds the strand;
//   - it writes its accumulator without reading it (a strand start): it goes
//     to the PE already mapped to that logical accumulator if there is one,
//     else to the lowest-numbered PE that no live strand owns;
//   - it touches no accumulator: it goes to the PE with the most free FIFO
//     entries and takes no ownership;
//   - an end-of-strand instruction releases the mapping after it is steered.
// The group is steered only if every instruction finds a PE with FIFO room
// (`ok`); the maps update when `fire` is high and clear on a flush. The policy
// details (choice of a free PE, handling of neutral instructions) are this
// design's choices. Needs NPE >= NACC so a strand start always finds a PE.
module steer
  import ildp_pkg::*;
#(
  parameter int NPE = 8,
  parameter int W   = 4,
  parameter int FW  = 5          // width of the FIFO free counts
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           flush,
  input  logic [W-1:0]   in_valid,
  input  logic [W-1:0]   in_rd_acc,
  input  logic [W-1:0]   in_wr_acc,
  input  logic [W-1:0]   in_eos,
  input  acc_t           in_acc [W],
  input  logic [FW-1:0]  fifo_free [NPE],
  output logic [$clog2(NPE)-1:0] out_pe [W],
  output logic           ok,
  input  logic           fire,
  // per-cycle statistics
  output logic [W-1:0]   st_new,     // slot started a strand
  output logic [W-1:0]   st_end      // slot ended a strand
);
  localparam int PW = $clog2(NPE);

  logic            amap_v  [NACC];
  logic [PW-1:0]   amap_pe [NACC];
  logic            amap_v_n  [NACC];
  logic [PW-1:0]   amap_pe_n [NACC];

  initial assert (NPE >= NACC);

  always_comb begin
    logic [NPE-1:0] owned;
    int             room [NPE];
    logic           found;
    logic [PW-1:0]  p;
    int             best;
    amap_v_n  = amap_v;
    amap_pe_n = amap_pe;
    ok        = 1'b1;
    st_new    = '0;
    st_end    = '0;
    found     = 1'b0;
    best      = -1;
    p         = '0;
    owned     = '0;
    for (int q = 0; q < NPE; q++) room[q] = int'(fifo_free[q]);
    for (int i = 0; i < W; i++) begin
      out_pe[i] = '0;
      owned = '0;
      for (int a = 0; a < NACC; a++)
        if (amap_v_n[a]) owned[amap_pe_n[a]] = 1'b1;
      if (in_valid[i]) begin
        found = 1'b0;
        p     = '0;
        if ((in_rd_acc[i] || in_wr_acc[i]) && amap_v_n[in_acc[i]]) begin
          p     = amap_pe_n[in_acc[i]];
          found = 1'b1;
        end else if (in_rd_acc[i] || in_wr_acc[i]) begin
          for (int q = NPE-1; q >= 0; q--)
            if (!owned[q]) begin
              p     = PW'(q);
              found = 1'b1;
            end
          st_new[i] = found;
        end else begin
          best = -1;
          p    = '0;
          for (int q = 0; q < NPE; q++)
            if (room[q] > best) begin
              best = room[q];
              p    = PW'(q);
            end
          found = 1'b1;
        end
        if (in_wr_acc[i] && !in_rd_acc[i] && amap_v_n[in_acc[i]]) st_new[i] = 1'b1;
        if (!found || room[p] == 0) ok = 1'b0;
        room[p]--;
        out_pe[i] = p;
        if (in_rd_acc[i] || in_wr_acc[i]) begin
          amap_v_n[in_acc[i]]  = !in_eos[i];
          amap_pe_n[in_acc[i]] = p;
          st_end[i]            = in_eos[i];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < NACC; a++) begin
        amap_v[a]  <= 1'b0;
        amap_pe[a] <= '0;
      end
    end else if (flush) begin
      for (int a = 0; a < NACC; a++) amap_v[a] <= 1'b0;
    end else if (fire) begin
      amap_v  <= amap_v_n;
      amap_pe <= amap_pe_n;
    end
  end
endmodule
