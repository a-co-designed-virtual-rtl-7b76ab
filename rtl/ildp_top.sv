// ildp_top: the ILDP processor core.
//
// Translated code (accumulator-oriented ILDP instructions, produced from the
// source ISA by the co-designed virtual machine's binary translator and held
// in its hidden code cache) is fetched, decoded, renamed and steered to NPE
// processing elements:
//
//   fetch ─► fetch buffer ─► decode / GPR rename / steer / ROB allocate
//        ─► per-PE instruction FIFOs ─► PEs (in-order issue, one unit each)
//        ─► reorder buffer ─► architected register file, data cache writes
//
// Only GPRs are renamed; accumulators are renamed by steering whole strands to
// one element. Each element keeps copies of the physical GPR file and of the
// store queue; GPR values travel between elements over the global
// communication network (latency COMM_LAT), store addresses over the memory
// ordering network to the store queue copies and the shared load queue. The
// data cache is replicated DC_COPIES times, each copy serving NPE/DC_COPIES
// elements. Control transfers are predicted at fetch (gshare, BTB, dual RAS)
// and verified at retirement (with the JTLT for register-indirect jumps); any
// misprediction or memory ordering violation flushes the core and refetches.
//
// Interface: the code cache is read through imem_addr / imem_data (32 bytes at
// the fetch TPC, first parcel in the top bits, combinational). dinit_* writes
// a word into every data cache copy (memory images before a run). `halted`
// rises when a halt instruction retires. arch_regs exposes the architected
// registers; perf counts events.
//
// Defaults follow the evaluated ILDP configuration where it gives them: 8
// processing elements, 4-wide decode and retirement, 128-entry ROB, 0-cycle
// global bypass, 32 KB data cache replicated twice with 2-cycle hits, 16K
// gshare with 12 history bits, 16-entry RAS, 512-entry 4-way BTB, 256-entry
// JTLT. FIFO depth, physical register, store and load queue sizes are this
// design's choices.
module ildp_top
  import ildp_pkg::*;
#(
  parameter int    NPE          = 8,
  parameter int    W            = 4,
  parameter int    ROB_DEPTH    = 128,
  parameter int    FIFO_DEPTH   = 16,
  parameter int    NPHYS        = 192,
  parameter int    SQ_DEPTH     = 32,
  parameter int    LQ_DEPTH     = 32,
  parameter int    COMM_LAT     = 0,
  parameter int    DC_WORDS     = 4096,
  parameter int    DC_COPIES    = 2,
  parameter int    DC_LAT       = 2,
  parameter int    GS_ENTRIES   = 16384,
  parameter int    RAS_DEPTH    = 16,
  parameter int    BTB_ENTRIES  = 512,
  parameter int    BTB_WAYS     = 4,
  parameter int    JTLT_ENTRIES = 256,
  parameter word_t RESET_TPC    = 64'h0,
  parameter word_t DISPATCH_TPC = 64'h100
) (
  input  logic         clk,
  input  logic         rst_n,
  output word_t        imem_addr,
  input  logic [255:0] imem_data,
  input  logic         dinit_en,
  input  word_t        dinit_addr,
  input  word_t        dinit_data,
  output logic         halted,
  output word_t        arch_regs [NGPR],
  output perf_t        perf
);
  localparam int FW  = $clog2(FIFO_DEPTH) + 1;
  localparam int PW  = $clog2(NPE);
  localparam int NRD = NPE / DC_COPIES;

  // ---------------------------------------------------------------- retire side
  logic          flush;
  word_t         redirect;

  // ---------------------------------------------------------------- fetch
  logic [W-1:0]  fv;
  fslot_t        fs [W];
  logic          fire;

  word_t gs_pc;  logic gs_taken; logic [11:0] gs_hist; logic gs_shift;
  word_t btb_pc; logic btb_hit;  word_t btb_tgt;
  logic ras_s_push, ras_s_pop; word_t ras_s_spc, ras_s_tpc, ras_top_spc, ras_top_tpc;

  fetch #(.W(W), .RESET_TPC(RESET_TPC)) u_fetch (
    .clk, .rst_n, .flush, .redirect,
    .imem_addr, .imem_data,
    .out_valid(fv), .out_slot(fs), .accept(fire),
    .gs_pc, .gs_taken, .gs_hist, .gs_shift,
    .btb_pc, .btb_hit, .btb_tgt,
    .ras_push(ras_s_push), .ras_pop(ras_s_pop),
    .ras_push_spc(ras_s_spc), .ras_push_tpc(ras_s_tpc),
    .ras_top_spc, .ras_top_tpc
  );

  // retirement-side predictor and table ports
  logic c_gs_en; word_t c_gs_pc; logic [11:0] c_gs_hist; logic c_gs_taken;
  logic c_btb_en; word_t c_btb_pc, c_btb_tgt;
  logic c_ras_push, c_ras_pop; word_t c_ras_spc, c_ras_tpc;
  word_t jt_spc; logic jt_hit; word_t jt_tpc;
  logic jt_wr_en; word_t jt_wr_spc, jt_wr_tpc;

  gshare #(.ENTRIES(GS_ENTRIES), .HIST(12)) u_gshare (
    .clk, .rst_n,
    .pr_pc(gs_pc), .pr_taken(gs_taken), .pr_hist(gs_hist), .pr_shift(gs_shift),
    .up_en(c_gs_en), .up_pc(c_gs_pc), .up_hist(c_gs_hist), .up_taken(c_gs_taken),
    .restore(flush)
  );

  btb #(.ENTRIES(BTB_ENTRIES), .WAYS(BTB_WAYS)) u_btb (
    .clk, .rst_n, .lk_pc(btb_pc), .lk_hit(btb_hit), .lk_tgt(btb_tgt),
    .up_en(c_btb_en), .up_pc(c_btb_pc), .up_tgt(c_btb_tgt)
  );

  dual_ras #(.DEPTH(RAS_DEPTH)) u_ras (
    .clk, .rst_n,
    .s_push(ras_s_push), .s_pop(ras_s_pop), .s_push_spc(ras_s_spc), .s_push_tpc(ras_s_tpc),
    .s_top_spc(ras_top_spc), .s_top_tpc(ras_top_tpc),
    .c_push(c_ras_push), .c_pop(c_ras_pop), .c_push_spc(c_ras_spc), .c_push_tpc(c_ras_tpc),
    .restore(flush)
  );

  jtlt #(.ENTRIES(JTLT_ENTRIES)) u_jtlt (
    .clk, .rst_n, .lk_spc(jt_spc), .lk_hit(jt_hit), .lk_tpc(jt_tpc),
    .wr_en(jt_wr_en), .wr_spc(jt_wr_spc), .wr_tpc(jt_wr_tpc)
  );

  // ---------------------------------------------------------------- rename
  logic [W-1:0] rd_gpr, alloc, rd_acc, wr_acc, eos, is_st, is_ld;
  gpr_t         rs [W], rd [W];
  acc_t         accn [W];
  always_comb
    for (int i = 0; i < W; i++) begin
      rd_gpr[i] = fs[i].uop.reads_gpr;
      alloc[i]  = fv[i] && fs[i].uop.wkind == W_GLOB;
      rs[i]     = fs[i].uop.rs;
      rd[i]     = fs[i].uop.rd;
      rd_acc[i] = fs[i].uop.reads_acc;
      wr_acc[i] = fs[i].uop.iclass inside {C_ALU, C_LD};
      eos[i]    = fs[i].uop.eos;
      accn[i]   = fs[i].uop.acc;
      is_st[i]  = fs[i].uop.iclass == C_ST;
      is_ld[i]  = fs[i].uop.iclass == C_LD;
    end

  ptag_t psrc [W], pdst [W], pold [W];
  logic  ren_ok;
  logic [W-1:0] rt_alloc;
  gpr_t  rt_rd [W];
  ptag_t rt_pdst [W], rt_pold [W];

  gpr_rename #(.NPHYS(NPHYS), .W(W), .RW(W)) u_rename (
    .clk, .rst_n, .flush,
    .in_valid(fv), .in_reads(rd_gpr), .in_rs(rs), .in_alloc(alloc), .in_rd(rd),
    .out_psrc(psrc), .out_pdst(pdst), .out_pold(pold), .ok(ren_ok), .fire,
    .rt_valid(rt_alloc), .rt_rd, .rt_pdst, .rt_pold
  );

  // ---------------------------------------------------------------- steer
  logic [FW-1:0] ffree [NPE];
  logic [PW-1:0] spe [W];
  logic          st_ok;
  logic [W-1:0]  st_new, st_end;

  steer #(.NPE(NPE), .W(W), .FW(FW)) u_steer (
    .clk, .rst_n, .flush,
    .in_valid(fv), .in_rd_acc(rd_acc), .in_wr_acc(wr_acc), .in_eos(eos), .in_acc(accn),
    .fifo_free(ffree), .out_pe(spe), .ok(st_ok), .fire, .st_new, .st_end
  );

  // ---------------------------------------------------------------- queues
  qidx_t sq_head, sq_tail, lq_head, lq_tail;
  qidx_t sqpos [W], lqpos [W];
  logic  q_ok;
  always_comb begin
    qidx_t s, l;
    s = sq_tail;
    l = lq_tail;
    for (int i = 0; i < W; i++) begin
      sqpos[i] = s;
      lqpos[i] = l;
      if (fv[i] && is_st[i]) s++;
      if (fv[i] && is_ld[i]) l++;
    end
    q_ok = ((s - sq_head) <= qidx_t'(SQ_DEPTH)) && ((l - lq_head) <= qidx_t'(LQ_DEPTH));
  end

  // ---------------------------------------------------------------- ROB
  rtag_t rtag [W];
  logic  rob_ok;
  cmpl_t cmpl [NPE];
  logic  viol_v [NPE];
  rtag_t viol_t [NPE];
  logic [W-1:0] aw_valid;
  gpr_t  aw_rd [W];
  word_t aw_value [W];
  logic  st_wr_en;
  word_t st_wr_addr, st_wr_data;
  logic [3:0] ld_retired, n_retired;
  logic  ev_br, ev_jmp, ev_rep, ev_jh, ev_jm, ev_rh;

  rob #(.DEPTH(ROB_DEPTH), .W(W), .RW(W), .NPE(NPE), .DISPATCH_TPC(DISPATCH_TPC)) u_rob (
    .clk, .rst_n,
    .in_valid(fv), .in_slot(fs), .in_pdst(pdst), .in_pold(pold), .out_rtag(rtag),
    .ok(rob_ok), .fire,
    .cmpl, .viol_valid(viol_v), .viol_rtag(viol_t),
    .rt_alloc, .rt_rd, .rt_pdst, .rt_pold,
    .aw_valid, .aw_rd, .aw_value,
    .st_wr_en, .st_wr_addr, .st_wr_data, .ld_retired,
    .jt_spc, .jt_hit, .jt_tpc, .jt_wr_en, .jt_wr_spc, .jt_wr_tpc,
    .ras_push(c_ras_push), .ras_pop(c_ras_pop), .ras_spc(c_ras_spc), .ras_tpc(c_ras_tpc),
    .gs_en(c_gs_en), .gs_pc(c_gs_pc), .gs_hist(c_gs_hist), .gs_taken(c_gs_taken),
    .btb_en(c_btb_en), .btb_pc(c_btb_pc), .btb_tgt(c_btb_tgt),
    .flush, .redirect, .halted,
    .n_retired, .ev_br_misp(ev_br), .ev_jmp_misp(ev_jmp), .ev_replay(ev_rep),
    .ev_jtlt_hit(ev_jh), .ev_jtlt_miss(ev_jm), .ev_ras_hit(ev_rh)
  );

  assign fire = (fv != '0) && ren_ok && st_ok && rob_ok && q_ok && !flush;

  arch_rf #(.NW(W)) u_arf (
    .clk, .rst_n, .wr_en(aw_valid), .wr_rd(aw_rd), .wr_value(aw_value), .regs(arch_regs)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq_head <= '0; sq_tail <= '0; lq_head <= '0; lq_tail <= '0;
    end else if (flush) begin
      sq_head <= '0; sq_tail <= '0; lq_head <= '0; lq_tail <= '0;
    end else begin
      sq_head <= sq_head + qidx_t'(st_wr_en);
      lq_head <= lq_head + qidx_t'(ld_retired);
      if (fire) begin
        qidx_t s, l;
        s = sq_tail;
        l = lq_tail;
        for (int i = 0; i < W; i++) begin
          if (fv[i] && is_st[i]) s++;
          if (fv[i] && is_ld[i]) l++;
        end
        sq_tail <= s;
        lq_tail <= l;
      end
    end
  end

  // ---------------------------------------------------------------- PEs
  disp_t        dent [W];
  logic [W-1:0] clr_v;
  always_comb
    for (int i = 0; i < W; i++) begin
      dent[i].uop   = fs[i].uop;
      dent[i].pc    = fs[i].pc;
      dent[i].rtag  = rtag[i];
      dent[i].psrc  = psrc[i];
      dent[i].pdst  = pdst[i];
      dent[i].sqpos = sqpos[i];
      dent[i].lqpos = lqpos[i];
      clr_v[i]      = fire && alloc[i];
    end

  gwr_t  gwr [NPE];
  gwr_t  gnet [NPE][NPE];
  stbc_t stb [NPE];
  logic  lq_v [NPE];
  qidx_t lq_p [NPE];
  rtag_t lq_r [NPE];
  word_t lq_a [NPE];
  logic  dc_en [NPE];
  word_t dc_addr [NPE];
  word_t dc_data [NPE];
  logic [NPE-1:0] pe_issue, pe_stall, pe_fwd, pe_remote;

  global_net #(.NPE(NPE), .LAT(COMM_LAT)) u_net (
    .clk, .rst_n, .flush, .in(gwr), .out(gnet)
  );

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    logic [W-1:0] inv;
    always_comb
      for (int i = 0; i < W; i++) inv[i] = fire && fv[i] && spe[i] == PW'(p);

    always_comb begin
      pe_remote[p] = 1'b0;
      for (int q = 0; q < NPE; q++)
        if (q != p && gnet[p][q].valid) pe_remote[p] = 1'b1;
    end

    pe #(.NPE(NPE), .W(W), .FIFO_DEPTH(FIFO_DEPTH), .NPHYS(NPHYS),
         .SQ_DEPTH(SQ_DEPTH), .DC_LAT(DC_LAT)) u_pe (
      .clk, .rst_n, .flush,
      .in_valid(inv), .in_ent(dent), .fifo_free(ffree[p]),
      .gwr_in(gnet[p]), .clr_valid(clr_v), .clr_tag(pdst),
      .gwr_out(gwr[p]), .cmpl(cmpl[p]), .st_out(stb[p]),
      .st_in(stb), .sq_free(st_wr_en), .sq_head,
      .lq_valid(lq_v[p]), .lq_pos(lq_p[p]), .lq_rtag(lq_r[p]), .lq_addr(lq_a[p]),
      .dc_rd_en(dc_en[p]), .dc_rd_addr(dc_addr[p]), .dc_rd_data(dc_data[p]),
      .busy_issue(pe_issue[p]), .stall_opnd(pe_stall[p]), .fwd_used(pe_fwd[p])
    );
  end

  load_queue #(.DEPTH(LQ_DEPTH), .NLD(NPE), .NST(NPE)) u_lq (
    .clk, .rst_n, .flush, .head(lq_head), .tail(lq_tail), .free_n(ld_retired),
    .ld_valid(lq_v), .ld_pos(lq_p), .ld_rtag(lq_r), .ld_addr(lq_a),
    .st(stb), .viol_valid(viol_v), .viol_rtag(viol_t)
  );

  // ---------------------------------------------------------------- data cache copies
  for (genvar c = 0; c < DC_COPIES; c++) begin : g_dc
    logic  en [NRD];
    word_t ad [NRD];
    word_t dt [NRD];
    always_comb
      for (int k = 0; k < NRD; k++) begin
        en[k] = dc_en[c*NRD + k];
        ad[k] = dc_addr[c*NRD + k];
      end
    for (genvar k = 0; k < NRD; k++) begin : g_ret
      assign dc_data[c*NRD + k] = dt[k];
    end
    dcache #(.WORDS(DC_WORDS), .NRD(NRD), .LAT(DC_LAT)) u_dc (
      .clk, .rst_n, .rd_en(en), .rd_addr(ad), .rd_data(dt),
      .wr_en(st_wr_en || dinit_en),
      .wr_addr(dinit_en ? dinit_addr : st_wr_addr),
      .wr_data(dinit_en ? dinit_data : st_wr_data)
    );
  end

  // ---------------------------------------------------------------- event counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) perf <= '0;
    else begin
      perf.cycles      <= perf.cycles + 1;
      perf.retired     <= perf.retired + 32'(n_retired);
      perf.br_misp     <= perf.br_misp + 32'(ev_br);
      perf.jmp_misp    <= perf.jmp_misp + 32'(ev_jmp);
      perf.replays     <= perf.replays + 32'(ev_rep);
      perf.jtlt_hits   <= perf.jtlt_hits + 32'(ev_jh);
      perf.jtlt_misses <= perf.jtlt_misses + 32'(ev_jm);
      perf.ras_hits    <= perf.ras_hits + 32'(ev_rh);
      perf.strands     <= perf.strands + (fire ? 32'($countones(st_new)) : 32'd0);
      perf.strand_ends <= perf.strand_ends + (fire ? 32'($countones(st_end)) : 32'd0);
      perf.opnd_stalls <= perf.opnd_stalls + 32'($countones(pe_stall));
      perf.disp_stalls <= perf.disp_stalls + 32'((fv != '0) && !fire && !flush);
      perf.fwd_loads   <= perf.fwd_loads + 32'($countones(pe_fwd));
      perf.remote_uses <= perf.remote_uses + 32'($countones(pe_remote));
    end
  end

  initial begin
    assert (NPE % DC_COPIES == 0);
    assert (NPHYS >= NGPR + W);
  end
endmodule
