// tb_rob: self-checking test of the reorder buffer.
//
// Random groups of ALU operations (with either GPR write kind), loads,
// stores, conditional branches and register jumps are allocated when the ROB
// has room; entries complete out of order through the PE completion ports and
// completed loads are sometimes flagged by the ordering check. A reference
// queue predicts each cycle's retirement: completed entries leave in order,
// at most RW per cycle, and a store, branch or jump closes the group. A
// mispredicted branch or jump flushes after retiring and redirects to its
// actual next TPC; a jump resolves through the JTLT answer (hit: the table's
// TPC, miss: the dispatch code); a flagged load is not retired but
// refetched. Checked: retire count, architected and rename writes, store
// writes, flush and redirect, and the misprediction / replay / JTLT events.
module tb_rob;
  import ildp_pkg::*;
  localparam int DEPTH = 128, W = 4, RW = 4, NPE = 8;
  localparam word_t DISP = 64'h100;
  logic clk = 0, rst_n = 0, ok, fire;
  logic [W-1:0] in_valid;
  fslot_t in_slot [W];
  ptag_t in_pdst [W], in_pold [W];
  rtag_t out_rtag [W];
  cmpl_t cmpl [NPE];
  logic  viol_valid [NPE];
  rtag_t viol_rtag [NPE];
  logic [RW-1:0] rt_alloc, aw_valid;
  gpr_t rt_rd [RW], aw_rd [RW];
  ptag_t rt_pdst [RW], rt_pold [RW];
  word_t aw_value [RW];
  logic st_wr_en; word_t st_wr_addr, st_wr_data;
  logic [3:0] ld_retired, n_retired;
  word_t jt_spc, jt_tpc, jt_wr_spc, jt_wr_tpc, ras_spc, ras_tpc, gs_pc, btb_pc, btb_tgt, redirect;
  logic jt_hit, jt_wr_en, ras_push, ras_pop, gs_en, gs_taken, btb_en, flush, halted;
  logic [11:0] gs_hist;
  logic ev_br_misp, ev_jmp_misp, ev_replay, ev_jtlt_hit, ev_jtlt_miss, ev_ras_hit;
  int checks = 0, failures = 0;
  int n_misp = 0, n_replay = 0, n_jhit = 0, n_jmiss = 0, n_ret = 0;

  rob #(.DEPTH(DEPTH), .W(W), .RW(RW), .NPE(NPE), .DISPATCH_TPC(DISP)) dut (.*);

  // JTLT answer: hit for SPCs with bit 3 set, TPC derived from the SPC
  assign jt_hit = jt_spc[3];
  assign jt_tpc = jt_spc + 64'h4000;

  always #5 clk = ~clk;
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int    rtag; iclass_e cls; wkind_e wk; int rd; int pdst; int pold; word_t pc; word_t pred;
    bit    done; bit replay; word_t value; word_t value2; bit taken;
  } ent_t;
  ent_t q[$];

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    word_t pcseq;
    fire = 0; in_valid = '0;
    for (int i = 0; i < W; i++) begin in_slot[i] = '0; in_pdst[i] = 0; in_pold[i] = 0; end
    for (int p = 0; p < NPE; p++) begin cmpl[p] = '0; viol_valid[p] = 0; viol_rtag[p] = 0; end
    pcseq = 64'h1000;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      ent_t ng [W]; int nv; int eret; bit ef; word_t ered; int k; bit stop;
      @(negedge clk);
      // new group
      nv = 0;
      for (int i = 0; i < W; i++) begin
        int c;
        in_valid[i] = $urandom_range(0, 3) != 0;
        in_slot[i] = '0;
        c = $urandom_range(0, 9);
        ng[i].cls = (c < 5) ? C_ALU : (c == 5) ? C_LD : (c == 6) ? C_ST : (c < 9) ? C_BR : C_JMP;
        ng[i].wk  = (ng[i].cls == C_ALU || ng[i].cls == C_LD) ? wkind_e'($urandom_range(0, 2)) : W_NONE;
        ng[i].rd  = $urandom_range(0, 63); ng[i].pdst = $urandom_range(64, 191); ng[i].pold = $urandom_range(0, 191);
        ng[i].pc  = pcseq + word_t'(4*i);
        ng[i].pred = (ng[i].cls == C_JMP) ? ($urandom_range(0, 1) ? 64'h5008 + 64'h4000 : ng[i].pc + 4)
                   : ($urandom_range(0, 1) ? ng[i].pc + 4 : ng[i].pc + 64'h40);
        ng[i].done = 0; ng[i].replay = 0;
        in_slot[i].uop.valid = 1; in_slot[i].uop.len = 2; in_slot[i].uop.iclass = ng[i].cls;
        in_slot[i].uop.wkind = ng[i].wk; in_slot[i].uop.rd = gpr_t'(ng[i].rd);
        in_slot[i].uop.imm = 64'h40; in_slot[i].uop.func = (ng[i].cls == C_BR) ? B_NE : J_JUMP;
        in_slot[i].pc = ng[i].pc; in_slot[i].pred_npc = ng[i].pred;
        in_pdst[i] = ptag_t'(ng[i].pdst); in_pold[i] = ptag_t'(ng[i].pold);
        if (in_valid[i]) nv++;
      end
      // completions and violations for entries already in the queue
      for (int p = 0; p < NPE; p++) begin
        cmpl[p] = '0; viol_valid[p] = 0;
        if (q.size() > 0) begin
          int j;
          j = $urandom_range(0, q.size() - 1);
          if (!q[j].done) begin
            bit dup;
            dup = 0;
            for (int r = 0; r < p; r++) if (cmpl[r].valid && int'(cmpl[r].rtag) == q[j].rtag) dup = 1;
            if (!dup) begin
              cmpl[p].valid = 1; cmpl[p].rtag = rtag_t'(q[j].rtag);
              cmpl[p].value = (q[j].cls == C_JMP) ? ($urandom_range(0, 1) ? 64'h5008 : 64'h5000) : {$urandom, $urandom};
              cmpl[p].value2 = {$urandom, $urandom}; cmpl[p].taken = $urandom_range(0, 1);
            end
          end else if (q[j].cls == C_LD && $urandom_range(0, 7) == 0) begin
            viol_valid[p] = 1; viol_rtag[p] = rtag_t'(q[j].rtag);
          end
        end
      end
      #1;
      // reference retirement
      eret = 0; ef = 0; ered = '0; stop = 0; k = 0;
      while (!stop && k < RW && k < q.size() && q[k].done) begin
        if (q[k].replay) begin ef = 1; ered = q[k].pc; stop = 1; n_replay++; end
        else begin
          word_t act;
          chk(aw_valid[k] == (q[k].wk != W_NONE) && (q[k].wk == W_NONE || (int'(aw_rd[k]) == q[k].rd && aw_value[k] == q[k].value)),
              $sformatf("n=%0d arch write slot %0d", n, k));
          chk(rt_alloc[k] == (q[k].wk == W_GLOB) && (q[k].wk != W_GLOB || (int'(rt_pdst[k]) == q[k].pdst && int'(rt_pold[k]) == q[k].pold)),
              $sformatf("n=%0d rename retire slot %0d", n, k));
          eret++;
          case (q[k].cls)
            C_ST: begin
              chk(st_wr_en && st_wr_addr == q[k].value && st_wr_data == q[k].value2, $sformatf("n=%0d store write", n));
              stop = 1;
            end
            C_BR: begin
              act = q[k].taken ? q[k].pc + 64'h40 : q[k].pc + 4;
              if (act != q[k].pred) begin ef = 1; ered = act; n_misp++; end
              stop = 1;
            end
            C_JMP: begin
              act = q[k].value[3] ? q[k].value + 64'h4000 : DISP;
              if (q[k].value[3]) n_jhit++; else n_jmiss++;
              chk(ev_jtlt_hit == q[k].value[3] && ev_jtlt_miss == !q[k].value[3], $sformatf("n=%0d jtlt event", n));
              if (act != q[k].pred) begin ef = 1; ered = act; n_misp++; end
              stop = 1;
            end
            default: ;
          endcase
        end
        k++;
      end
      chk(int'(n_retired) == eret, $sformatf("n=%0d retired %0d want %0d", n, n_retired, eret));
      chk(flush == ef && (!ef || redirect == ered), $sformatf("n=%0d flush=%b want %b redirect=%h want %h", n, flush, ef, redirect, ered));
      chk(ev_replay == (ef && eret < k), $sformatf("n=%0d replay event", n));
      n_ret += eret;
      fire = ok && !flush;
      // apply to the reference
      for (int r = 0; r < eret; r++) void'(q.pop_front());
      if (ef) q.delete();
      else begin
        foreach (q[j]) for (int p = 0; p < NPE; p++) begin
          if (cmpl[p].valid && int'(cmpl[p].rtag) == q[j].rtag) begin
            q[j].done = 1; q[j].value = cmpl[p].value; q[j].value2 = cmpl[p].value2; q[j].taken = cmpl[p].taken;
          end
          if (viol_valid[p] && int'(viol_rtag[p]) == q[j].rtag) q[j].replay = 1;
        end
        if (fire) begin
          int r;
          r = 0;
          for (int i = 0; i < W; i++) if (in_valid[i]) begin
            ng[i].rtag = int'(out_rtag[i]);
            q.push_back(ng[i]);
            r++;
          end
          pcseq += 64'h100;
        end
      end
      chk(q.size() <= DEPTH, "reference overflow");
      @(posedge clk);
      #1 fire = 0;
    end
    if (n_misp == 0 || n_replay == 0 || n_jhit == 0 || n_jmiss == 0 || n_ret < 1000) begin
      failures++;
      $display("FAIL coverage misp=%0d replay=%0d jhit=%0d jmiss=%0d retired=%0d", n_misp, n_replay, n_jhit, n_jmiss, n_ret);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
