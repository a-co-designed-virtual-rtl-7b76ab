// tb_pe: self-checking test of one processing element.
//
// Each round flushes the PE and dispatches a random 40-instruction sequence:
// accumulator ALU operations in every operand mode, loads, stores and
// branches. GPR sources are either one of eight "remote" registers, whose
// ready bits are cleared first and whose values arrive on a network port at
// random later cycles, or the destination of an earlier instruction of the
// same sequence written by this PE (own-result bypass). The testbench plays
// the data cache (2-cycle reads of a small memory) and loops the PE's store
// broadcast back into its store queue copy, so loads after a store to the
// same address must take the forwarded data. A sequential reference gives,
// in order, every completion (value, store data, branch outcome), every
// global register write and every load-queue record. Also checked: an
// operand stall and a forwarded load happen, and no instruction issues
// before its GPR source arrives.
module tb_pe;
  import ildp_pkg::*;
  localparam int NPE = 8, W = 4, FD = 16, NPHYS = 192, SQD = 32, LAT = 2;
  logic clk = 0, rst_n = 0, flush;
  logic [W-1:0] in_valid;
  disp_t in_ent [W];
  logic [$clog2(FD):0] fifo_free;
  gwr_t gwr_in [NPE];
  logic [W-1:0] clr_valid;
  ptag_t clr_tag [W];
  gwr_t gwr_out; cmpl_t cmpl; stbc_t st_out;
  stbc_t st_in [NPE];
  logic sq_free; qidx_t sq_head;
  logic lq_valid; qidx_t lq_pos; rtag_t lq_rtag; word_t lq_addr;
  logic dc_rd_en; word_t dc_rd_addr, dc_rd_data;
  logic busy_issue, stall_opnd, fwd_used;
  int checks = 0, failures = 0, stalls = 0, fwds = 0;

  pe #(.NPE(NPE), .W(W), .FIFO_DEPTH(FD), .NPHYS(NPHYS), .SQ_DEPTH(SQD), .DC_LAT(LAT)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // data cache model: 16 words at 0x200
  word_t mem [16];
  word_t dpipe [LAT];
  always_ff @(posedge clk) begin
    dpipe[0] <= dc_rd_en ? mem[dc_rd_addr[6:3]] : '0;
    for (int s = 1; s < LAT; s++) dpipe[s] <= dpipe[s-1];
  end
  assign dc_rd_data = dpipe[LAT-1];

  // own results and stores loop back; port 1 carries remote values
  gwr_t remote;
  always_comb begin
    for (int p = 0; p < NPE; p++) begin gwr_in[p] = '0; st_in[p] = '0; end
    gwr_in[0] = gwr_out;
    gwr_in[1] = remote;
    st_in[0]  = st_out;
  end

  function automatic logic ref_br(logic [4:0] c, word_t a);
    case (c)
      0: return a == 0;
      1: return a != 0;
      2: return $signed(a) < 0;
      3: return $signed(a) >= 0;
      4: return 1;
      default: return 0;
    endcase
  endfunction

  cmpl_t exp_c[$];
  gwr_t  exp_g[$];
  word_t exp_l[$];
  bit    src_ready [NPHYS];

  // monitor
  always @(posedge clk) if (rst_n && !flush) begin
    if (cmpl.valid) begin
      cmpl_t e;
      checks++;
      if (exp_c.size() == 0) begin failures++; $display("FAIL unexpected completion"); end
      else begin
        e = exp_c.pop_front();
        if (cmpl.rtag !== e.rtag || cmpl.value !== e.value || cmpl.value2 !== e.value2 || cmpl.taken !== e.taken) begin
          failures++;
          if (failures < 10) $display("FAIL completion rtag=%0d val=%h/%h t=%b want rtag=%0d %h/%h t=%b", cmpl.rtag, cmpl.value, cmpl.value2, cmpl.taken, e.rtag, e.value, e.value2, e.taken);
        end
      end
    end
    if (gwr_out.valid) begin
      gwr_t e;
      checks++;
      e = exp_g.size() ? exp_g.pop_front() : '0;
      if (gwr_out !== e) begin failures++; if (failures < 10) $display("FAIL global write %p want %p", gwr_out, e); end
    end
    if (lq_valid) begin
      checks++;
      if (exp_l.size() == 0 || lq_addr !== exp_l[0]) begin failures++; $display("FAIL load record %h", lq_addr); end
      if (exp_l.size()) void'(exp_l.pop_front());
    end
    if (busy_issue && dut.u.reads_gpr && !src_ready[dut.head.psrc]) begin
      failures++; $display("FAIL issue before operand arrived");
    end
    if (stall_opnd) stalls++;
    if (fwd_used) fwds++;
  end

  initial begin
    word_t acc;
    word_t rv [NPHYS];
    flush = 0; in_valid = '0; clr_valid = '0; remote = '0; sq_free = 0; sq_head = 0;
    for (int i = 0; i < W; i++) begin in_ent[i] = '0; clr_tag[i] = 0; end
    for (int i = 0; i < 16; i++) mem[i] = {$urandom, $urandom};
    for (int t = 0; t < NPHYS; t++) begin rv[t] = '0; src_ready[t] = 1; end
    acc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 60; round++) begin
      disp_t prog[$]; int nst; word_t sqa [32], sqd [32]; int arrive [8]; bit sent [8]; int nd, cyc;
      // flush, then clear the ready bits of the remote registers 1..8
      @(negedge clk); flush = 1;
      @(negedge clk); flush = 0;
      for (int r = 0; r < 8; r += W) begin
        for (int i = 0; i < W; i++) begin clr_valid[i] = 1; clr_tag[i] = ptag_t'(1 + r + i); src_ready[1 + r + i] = 0; end
        @(negedge clk);
      end
      clr_valid = '0;
      for (int r = 0; r < 8; r++) begin rv[1 + r] = {$urandom, $urandom}; arrive[r] = $urandom_range(0, 60); sent[r] = 0; end
      // build the sequence and its reference results
      nst = 0;
      exp_c.delete(); exp_g.delete(); exp_l.delete(); prog.delete();
      for (int i = 0; i < 40; i++) begin
        disp_t d; int k; cmpl_t c; word_t r, x, y, res, ea;
        d = '0; c = '0;
        d.rtag = rtag_t'(i); d.pdst = ptag_t'(100 + i); d.sqpos = qidx_t'(nst); d.lqpos = qidx_t'(i);
        d.uop.valid = 1; d.uop.len = 2;
        // GPR source: a remote register or an earlier own global result
        if (prog.size() > 0 && prog[$].uop.wkind == W_GLOB && $urandom_range(0, 1)) d.psrc = prog[$].pdst;
        else d.psrc = ptag_t'($urandom_range(1, 8));
        r = rv[d.psrc];
        k = $urandom_range(0, 9);
        c.valid = 1; c.rtag = d.rtag;
        if (k < 5) begin
          d.uop.iclass = C_ALU; d.uop.wkind = wkind_e'($urandom_range(0, 2));
          d.uop.mode = opmode_e'($urandom_range(0, 4)); d.uop.func = 5'($urandom_range(0, 13));
          d.uop.imm = word_t'($signed(8'($urandom)));
          d.uop.reads_gpr = d.uop.mode inside {M_AR, M_RA, M_R};
          case (d.uop.mode)
            M_AR: begin x = acc; y = r; end
            M_RA: begin x = r; y = acc; end
            M_AI: begin x = acc; y = d.uop.imm; end
            default: begin x = r; y = d.uop.imm; end
          endcase
          res = (d.uop.mode == M_R) ? r : (d.uop.mode == M_I) ? d.uop.imm : ildp_tb_pkg::ref_alu(d.uop.func, x, y);
          acc = res; c.value = res;
          if (d.uop.wkind == W_GLOB) begin gwr_t g; g.valid = 1; g.tag = d.pdst; g.value = res; exp_g.push_back(g); rv[d.pdst] = res; end
        end else if (k < 7) begin
          // load from 0x200 + 8*j, base in A (after setting A) or in R
          int j;
          j = $urandom_range(0, 15);
          d.uop.iclass = C_LD; d.uop.wkind = wkind_e'($urandom_range(0, 2)); d.uop.mode = M_AR;
          d.uop.imm = word_t'(8 * j); d.uop.reads_acc = 1;
          begin   // a strand start A <- 0x200 goes first
            disp_t pre; cmpl_t pc2;
            pre = '0; pre.uop.valid = 1; pre.uop.len = 2; pre.uop.iclass = C_ALU; pre.uop.mode = M_I;
            pre.uop.imm = 64'h200; pre.rtag = rtag_t'(100 + i);
            pc2 = '0; pc2.valid = 1; pc2.rtag = pre.rtag; pc2.value = 64'h200;
            prog.push_back(pre); exp_c.push_back(pc2);
          end
          acc = 64'h200;
          ea = 64'h200 + 8 * j;
          res = mem[j];
          for (int s2 = 0; s2 < nst; s2++) if (sqa[s2] == ea) res = sqd[s2];
          exp_l.push_back(ea);
          acc = res; c.value = res;
          if (d.uop.wkind == W_GLOB) begin gwr_t g; g.valid = 1; g.tag = d.pdst; g.value = res; exp_g.push_back(g); rv[d.pdst] = res; end
        end else if (k < 9 && nst < 31) begin
          int j;
          j = $urandom_range(0, 15);
          d.uop.iclass = C_ST; d.uop.mode = M_RA; d.uop.reads_gpr = 1; d.uop.reads_acc = 1;
          // address R + off, data A: R is a remote register, offset chosen so the address lands in the table
          d.psrc = ptag_t'($urandom_range(1, 8));
          r = rv[d.psrc];
          d.uop.imm = 64'h200 + 8 * j - r;
          ea = 64'h200 + 8 * j;
          sqa[nst] = ea; sqd[nst] = acc; nst++;
          c.value = ea; c.value2 = acc;
        end else begin
          d.uop.iclass = C_BR; d.uop.func = 5'($urandom_range(0, 4)); d.uop.reads_acc = 1;
          c.taken = ref_br(d.uop.func, acc);
        end
        prog.push_back(d);
        exp_c.push_back(c);
      end
      // dispatch as fast as the FIFO allows
      nd = 0; cyc = 0;
      while (exp_c.size() > 0 && cyc < 3000) begin
        int k;
        @(negedge clk);
        in_valid = '0;
        k = 0;
        while (nd < prog.size() && k < W && int'(fifo_free) > k) begin
          in_ent[k] = prog[nd]; in_valid[k] = 1; k++; nd++;
        end
        remote = '0;
        for (int r = 0; r < 8; r++) if (!sent[r] && cyc >= arrive[r] && !remote.valid) begin
          remote.valid = 1; remote.tag = ptag_t'(1 + r); remote.value = rv[1 + r]; sent[r] = 1;
        end
        cyc++;
        @(posedge clk);
        #1;
        if (remote.valid) src_ready[remote.tag] = 1;
        in_valid = '0; remote = '0;
      end
      if (exp_c.size() != 0) begin failures++; $display("FAIL round %0d: %0d completions missing", round, exp_c.size()); end
      for (int r = 0; r < 8; r++) begin rv[1 + r] = '0; src_ready[1 + r] = 1; end
    end
    if (stalls == 0 || fwds == 0) begin failures++; $display("FAIL coverage stalls=%0d fwds=%0d", stalls, fwds); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
