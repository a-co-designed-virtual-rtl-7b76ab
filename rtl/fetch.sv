// fetch: instruction fetch with next-TPC prediction.
//
// Each cycle fetch reads a window of 16 parcels (32 bytes) of translated code
// at the fetch TPC, finds the boundaries of up to W sequential instructions
// (16, 32 or 64 bits each) and places them, decoded, in the fetch buffer for
// the dispatch stage. A group ends after the first control transfer, after a
// push-dual-RAS and after a halt; fetch stops at a halt until redirected.
// The next TPC is predicted from the group's last instruction:
//   conditional branch   gshare direction, target computed from the
//                        displacement; unconditional branch always taken;
//   jump                 BTB target on a hit, else fall-through;
//   return               TPC on top of the speculative dual RAS, whose SPC is
//                        kept with the instruction for the check at retirement;
//   push-dual-RAS        pushes its (SPC, TPC) on the speculative stack.
// The predictors themselves are separate blocks; this one drives their
// speculative-side ports. A new group is taken when the buffer is empty or
// consumed in the same cycle. A flush empties the buffer and sets the fetch
// TPC to the redirect address. The window width, the one-prediction-per-cycle
// group rule and buffer handling are this design's choices.
module fetch
  import ildp_pkg::*;
#(
  parameter int    W        = 4,
  parameter word_t RESET_TPC = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flush,
  input  word_t        redirect,
  // code cache / I-cache read
  output word_t        imem_addr,
  input  logic [255:0] imem_data,
  // to dispatch
  output logic [W-1:0] out_valid,
  output fslot_t       out_slot [W],
  input  logic         accept,
  // gshare
  output word_t        gs_pc,
  input  logic         gs_taken,
  input  logic [11:0]  gs_hist,
  output logic         gs_shift,
  // BTB
  output word_t        btb_pc,
  input  logic         btb_hit,
  input  word_t        btb_tgt,
  // dual RAS, speculative side
  output logic         ras_push,
  output logic         ras_pop,
  output word_t        ras_push_spc,
  output word_t        ras_push_tpc,
  input  word_t        ras_top_spc,
  input  word_t        ras_top_tpc
);
  word_t        pc;
  logic         stopped;
  logic [W-1:0] fb_valid;
  fslot_t       fb [W];

  assign imem_addr = pc;
  assign out_valid = fb_valid;
  assign out_slot  = fb;

  // boundaries and decode
  uop_t         du   [W];   // decoded slot i
  logic [4:0]   off  [W+1];
  logic [W-1:0] g_valid;
  fslot_t       g    [W];   // group before the direction / target lookup
  fslot_t       gf   [W];   // group as loaded into the fetch buffer
  word_t        npc, npc_f;
  logic [1:0]   ctl_sel;    // 0 none, 1 conditional branch, 2 BTB jump
  logic [$clog2(W)-1:0] ctl_i;
  word_t        ctl_tgt;
  logic         halt_in_group;
  logic         gs_shift_c, ras_push_c, ras_pop_c;
  logic         load;

  // Every parcel offset of the window is decoded in parallel; the group is
  // then chained through the decoded lengths.
  uop_t pd [16];
  for (genvar o = 0; o < 16; o++) begin : g_dec
    logic [63:0] win;
    always_comb begin
      win = '0;
      for (int k = 0; k < 4; k++)
        if (o + k < 16) win[63-16*k -: 16] = imem_data[255 - 16*(o + k) -: 16];
    end
    ildp_decode u_dec (.win(win), .uop(pd[o]));
  end

  always_comb begin
    logic ended;
    off[0]        = '0;
    g_valid       = '0;
    ended         = stopped;
    npc           = pc;
    halt_in_group = 1'b0;
    gs_pc = '0; gs_shift_c = 1'b0; btb_pc = '0;
    ctl_sel = '0; ctl_i = '0; ctl_tgt = '0;
    ras_push_c = 1'b0; ras_pop_c = 1'b0; ras_push_spc = '0; ras_push_tpc = '0;
    for (int i = 0; i < W; i++) begin
      word_t ipc, fall;
      du[i]    = pd[off[i][3:0]];
      off[i+1] = off[i] + 5'(du[i].len);
      ipc      = pc + word_t'({off[i], 1'b0});
      fall     = pc + word_t'({off[i+1], 1'b0});
      g[i]          = '0;
      g[i].uop      = du[i];
      g[i].pc       = ipc;
      g[i].pred_npc = fall;
      if (!ended && off[i+1] <= 5'd16) begin
        g_valid[i] = 1'b1;
        npc        = fall;
        unique case (du[i].iclass)
          C_BR: begin
            ended = 1'b1;
            if (du[i].func == B_AL) begin
              g[i].pred_npc = ipc + du[i].imm;
            end else begin
              gs_pc         = ipc;
              gs_shift_c    = 1'b1;
              g[i].ghist    = gs_hist;
              ctl_sel       = 2'd1;
              ctl_i         = i[$clog2(W)-1:0];
              ctl_tgt       = ipc + du[i].imm;
            end
          end
          C_JMP: begin
            ended = 1'b1;
            if (du[i].func == J_RET) begin
              ras_pop_c     = 1'b1;
              g[i].ras_spc  = ras_top_spc;
              g[i].pred_npc = ras_top_tpc;
            end else begin
              btb_pc        = ipc;
              ctl_sel       = 2'd2;
              ctl_i         = i[$clog2(W)-1:0];
            end
          end
          C_PUSH: begin
            ended        = 1'b1;
            ras_push_c   = 1'b1;
            ras_push_spc = word_t'(du[i].lit);
            ras_push_tpc = ipc + du[i].imm;
          end
          C_HALT: begin
            ended         = 1'b1;
            halt_in_group = 1'b1;
          end
          default: ;
        endcase
        npc = g[i].pred_npc;
      end else begin
        ended = 1'b1;
      end
    end
  end

  // The predictor answers are applied in a separate step so that the lookup
  // addresses above do not depend on them.
  always_comb begin
    gf    = g;
    npc_f = npc;
    if (ctl_sel == 2'd1 && gs_taken) begin
      gf[ctl_i].pred_npc = ctl_tgt;
      npc_f              = ctl_tgt;
    end else if (ctl_sel == 2'd2 && btb_hit) begin
      gf[ctl_i].pred_npc = btb_tgt;
      npc_f              = btb_tgt;
    end
  end

  assign load = !flush && !stopped && (fb_valid == '0 || accept);

  // speculative predictor state changes only when the group is taken
  assign gs_shift = gs_shift_c && load;
  assign ras_push = ras_push_c && load;
  assign ras_pop  = ras_pop_c && load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= RESET_TPC;
      stopped  <= 1'b0;
      fb_valid <= '0;
    end else if (flush) begin
      pc       <= redirect;
      stopped  <= 1'b0;
      fb_valid <= '0;
    end else begin
      if (accept) fb_valid <= '0;
      if (load) begin
        fb_valid <= g_valid;
        fb       <= gf;
        pc       <= npc_f;
        if (halt_in_group) stopped <= 1'b1;
      end
    end
  end
endmodule
