// rob: reorder buffer with in-order retirement and control-transfer
// resolution.
//
// Entries are allocated in program order for a whole dispatch group, marked
// done by completion reports from the processing elements, and retired in
// order, up to RW per cycle. A retiring instruction writes its GPR result to
// the architected register file (both write kinds), frees the physical
// register it displaced, and releases its load or store queue slot; a store
// writes the data cache. At most one instruction that is a store or a
// control transfer retires per cycle and it closes the retirement group.
//
// Control transfers are verified at retirement against the next TPC fetch
// followed; a difference flushes the pipeline and redirects fetch:
//   branch          taken target or fall-through; trains gshare.
//   jump            the SPC from the register is looked up in the JTLT: a hit
//                   gives the target TPC (and trains the BTB), a miss sends
//                   fetch to the translator's dispatch code (DISPATCH_TPC).
//   return          the SPC popped from the dual RAS at fetch is compared with
//                   the SPC in the register: equal means the popped TPC was
//                   right; otherwise the jump path above decides.
//   push-dual-RAS   pushes (SPC, TPC) on the committed stack.
//   JTLT write      writes the entry.
//   halt            stops retirement.
// A load squashed by the memory ordering check is not retired: the pipeline
// is flushed and fetch restarts at the load. Resolving at retirement, with a
// full flush, is this design's choice.
module rob
  import ildp_pkg::*;
#(
  parameter int    DEPTH        = 128,
  parameter int    W            = 4,
  parameter int    RW           = 4,
  parameter int    NPE          = 8,
  parameter word_t DISPATCH_TPC = 64'h100
) (
  input  logic         clk,
  input  logic         rst_n,
  // allocation
  input  logic [W-1:0] in_valid,
  input  fslot_t       in_slot [W],
  input  ptag_t        in_pdst [W],
  input  ptag_t        in_pold [W],
  output rtag_t        out_rtag [W],
  output logic         ok,
  input  logic         fire,
  // completion and squash
  input  cmpl_t        cmpl [NPE],
  input  logic         viol_valid [NPE],
  input  rtag_t        viol_rtag  [NPE],
  // retirement: rename and architected state
  output logic [RW-1:0] rt_alloc,
  output gpr_t          rt_rd   [RW],
  output ptag_t         rt_pdst [RW],
  output ptag_t         rt_pold [RW],
  output logic [RW-1:0] aw_valid,
  output gpr_t          aw_rd    [RW],
  output word_t         aw_value [RW],
  output logic          st_wr_en,
  output word_t         st_wr_addr,
  output word_t         st_wr_data,
  output logic [3:0]    ld_retired,
  // control transfer resolution
  output word_t         jt_spc,
  input  logic          jt_hit,
  input  word_t         jt_tpc,
  output logic          jt_wr_en,
  output word_t         jt_wr_spc,
  output word_t         jt_wr_tpc,
  output logic          ras_push,
  output logic          ras_pop,
  output word_t         ras_spc,
  output word_t         ras_tpc,
  output logic          gs_en,
  output word_t         gs_pc,
  output logic [11:0]   gs_hist,
  output logic          gs_taken,
  output logic          btb_en,
  output word_t         btb_pc,
  output word_t         btb_tgt,
  output logic          flush,
  output word_t         redirect,
  output logic          halted,
  // statistics for this cycle
  output logic [3:0]    n_retired,
  output logic          ev_br_misp,
  output logic          ev_jmp_misp,
  output logic          ev_replay,
  output logic          ev_jtlt_hit,
  output logic          ev_jtlt_miss,
  output logic          ev_ras_hit
);
  localparam int AW = $clog2(DEPTH);

  typedef struct packed {
    fslot_t s;
    ptag_t  pdst;
    ptag_t  pold;
    logic   done;
    logic   replay;
    word_t  value;
    word_t  value2;
    logic   taken;
  } ent_t;

  ent_t          q [DEPTH];
  logic [DEPTH-1:0] vld;
  logic [AW-1:0] head, tail;
  logic [AW:0]   count;
  logic          halt_q;

  // allocation
  logic [AW:0] nalloc;
  always_comb begin
    nalloc = '0;
    for (int i = 0; i < W; i++) begin
      out_rtag[i] = rtag_t'(tail + AW'(nalloc));
      if (in_valid[i]) nalloc++;
    end
    ok = (count + nalloc) <= (AW+1)'(DEPTH);
  end

  // JTLT lookup for the first jump in the retirement window. Only the first
  // jump can retire in a cycle, since a jump closes the retirement group.
  always_comb begin
    logic found;
    found  = 1'b0;
    jt_spc = '0;
    for (int i = 0; i < RW; i++)
      if (!found && vld[AW'(head + AW'(i))] && q[AW'(head + AW'(i))].s.uop.iclass == C_JMP) begin
        found  = 1'b1;
        jt_spc = q[AW'(head + AW'(i))].value;
      end
  end

  // retirement
  logic [AW:0] nret;
  logic        do_flush;
  always_comb begin
    logic stop;
    ent_t e;
    word_t fall, actual, jt_target;
    rt_alloc = '0; aw_valid = '0;
    for (int i = 0; i < RW; i++) begin
      rt_rd[i] = '0; rt_pdst[i] = '0; rt_pold[i] = '0;
      aw_rd[i] = '0; aw_value[i] = '0;
    end
    st_wr_en = 1'b0; st_wr_addr = '0; st_wr_data = '0;
    ld_retired = '0;
    jt_wr_en = 1'b0; jt_wr_spc = '0; jt_wr_tpc = '0;
    ras_push = 1'b0; ras_pop = 1'b0; ras_spc = '0; ras_tpc = '0;
    gs_en = 1'b0; gs_pc = '0; gs_hist = '0; gs_taken = 1'b0;
    btb_en = 1'b0; btb_pc = '0; btb_tgt = '0;
    do_flush = 1'b0; redirect = '0;
    ev_br_misp = 1'b0; ev_jmp_misp = 1'b0; ev_replay = 1'b0;
    ev_jtlt_hit = 1'b0; ev_jtlt_miss = 1'b0; ev_ras_hit = 1'b0;
    nret = '0;
    stop = halt_q;
    e = '0; fall = '0; actual = '0; jt_target = '0;
    for (int i = 0; i < RW; i++) begin
      e = q[AW'(head + AW'(i))];
      if (!stop && vld[AW'(head + AW'(i))] && e.done) begin
        if (e.replay) begin
          do_flush  = 1'b1;
          redirect  = e.s.pc;
          ev_replay = 1'b1;
          stop      = 1'b1;
        end else begin
          nret++;
          fall = e.s.pc + word_t'({e.s.uop.len, 1'b0});
          if (e.s.uop.wkind != W_NONE) begin
            aw_valid[i] = 1'b1;
            aw_rd[i]    = e.s.uop.rd;
            aw_value[i] = e.value;
          end
          if (e.s.uop.wkind == W_GLOB) begin
            rt_alloc[i] = 1'b1;
            rt_rd[i]    = e.s.uop.rd;
            rt_pdst[i]  = e.pdst;
            rt_pold[i]  = e.pold;
          end
          if (e.s.uop.iclass == C_LD) ld_retired++;
          unique case (e.s.uop.iclass)
            C_ST: begin
              st_wr_en   = 1'b1;
              st_wr_addr = e.value;
              st_wr_data = e.value2;
              stop       = 1'b1;
            end
            C_BR: begin
              actual = e.taken ? e.s.pc + e.s.uop.imm : fall;
              if (e.s.uop.func != B_AL) begin
                gs_en    = 1'b1;
                gs_pc    = e.s.pc;
                gs_hist  = e.s.ghist;
                gs_taken = e.taken;
              end
              if (actual != e.s.pred_npc) begin
                do_flush   = 1'b1;
                redirect   = actual;
                ev_br_misp = 1'b1;
              end
              stop = 1'b1;
            end
            C_JMP: begin
              jt_target = jt_hit ? jt_tpc : DISPATCH_TPC;
              if (e.s.uop.func == J_RET) ras_pop = 1'b1;
              if (e.s.uop.func == J_RET && e.s.ras_spc == e.value) begin
                actual     = e.s.pred_npc;
                ev_ras_hit = 1'b1;
              end else begin
                actual       = jt_target;
                ev_jtlt_hit  = jt_hit;
                ev_jtlt_miss = !jt_hit;
                if (jt_hit && e.s.uop.func == J_JUMP) begin
                  btb_en  = 1'b1;
                  btb_pc  = e.s.pc;
                  btb_tgt = jt_tpc;
                end
              end
              if (actual != e.s.pred_npc) begin
                do_flush    = 1'b1;
                redirect    = actual;
                ev_jmp_misp = 1'b1;
              end
              stop = 1'b1;
            end
            C_PUSH: begin
              ras_push = 1'b1;
              ras_spc  = word_t'(e.s.uop.lit);
              ras_tpc  = e.s.pc + e.s.uop.imm;
              stop     = 1'b1;
            end
            C_JTW: begin
              jt_wr_en  = 1'b1;
              jt_wr_spc = e.value;
              jt_wr_tpc = e.value2;
              stop      = 1'b1;
            end
            C_HALT: stop = 1'b1;
            default: ;
          endcase
        end
      end else begin
        stop = 1'b1;
      end
    end
  end

  logic halting;
  always_comb begin
    halting = 1'b0;
    for (int i = 0; i < RW; i++)
      if (i < int'(nret) && q[AW'(head + AW'(i))].s.uop.iclass == C_HALT) halting = 1'b1;
  end

  assign flush     = do_flush;
  assign halted    = halt_q;
  assign n_retired = 4'(nret);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld    <= '0;
      head   <= '0;
      tail   <= '0;
      count  <= '0;
      halt_q <= 1'b0;
    end else begin
      if (halting) halt_q <= 1'b1;
      if (do_flush) begin
        vld   <= '0;
        head  <= '0;
        tail  <= '0;
        count <= '0;
      end else begin
        for (int i = 0; i < RW; i++)
          if (i < int'(nret)) vld[AW'(head + AW'(i))] <= 1'b0;
        head <= head + AW'(nret);
        if (fire) begin
          for (int i = 0; i < W; i++)
            if (in_valid[i]) vld[AW'(out_rtag[i])] <= 1'b1;
          tail <= tail + AW'(nalloc);
        end
        count <= count - nret + (fire ? nalloc : '0);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fire && !do_flush)
      for (int i = 0; i < W; i++)
        if (in_valid[i]) begin
          q[AW'(out_rtag[i])].s      <= in_slot[i];
          q[AW'(out_rtag[i])].pdst   <= in_pdst[i];
          q[AW'(out_rtag[i])].pold   <= in_pold[i];
          q[AW'(out_rtag[i])].done   <= 1'b0;
          q[AW'(out_rtag[i])].replay <= 1'b0;
        end
    for (int p = 0; p < NPE; p++)
      if (cmpl[p].valid) begin
        q[AW'(cmpl[p].rtag)].done   <= 1'b1;
        q[AW'(cmpl[p].rtag)].value  <= cmpl[p].value;
        q[AW'(cmpl[p].rtag)].value2 <= cmpl[p].value2;
        q[AW'(cmpl[p].rtag)].taken  <= cmpl[p].taken;
      end
    for (int p = 0; p < NPE; p++)
      if (viol_valid[p]) q[AW'(viol_rtag[p])].replay <= 1'b1;
  end
endmodule
