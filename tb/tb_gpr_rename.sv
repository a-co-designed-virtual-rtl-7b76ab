// tb_gpr_rename: self-checking test of GPR renaming.
//
// Random dispatch groups (some slots allocate a physical register for their
// destination, all name a source) are renamed and fired when the unit reports
// enough free registers; renamed destinations retire in order, up to RW per
// cycle, and a flush now and then restores the map to the retired state.
// A reference keeps the speculative map, the retirement map and the free
// set, and allocates the lowest-numbered free registers. Checked each cycle:
// ok, every source tag (including a producer earlier in the same group), every
// new tag and every previous mapping.
module tb_gpr_rename;
  import ildp_pkg::*;
  localparam int NPHYS = 192, W = 4, RW = 4;
  logic clk = 0, rst_n = 0, flush, ok, fire;
  logic [W-1:0] in_valid, in_reads, in_alloc;
  gpr_t  in_rs [W], in_rd [W];
  ptag_t out_psrc [W], out_pdst [W], out_pold [W];
  logic [RW-1:0] rt_valid;
  gpr_t  rt_rd [RW];
  ptag_t rt_pdst [RW], rt_pold [RW];
  int checks = 0, failures = 0;

  gpr_rename #(.NPHYS(NPHYS), .W(W), .RW(RW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int smap [NGPR], rmap [NGPR];
  bit fr [NPHYS];
  typedef struct { int rd; int pdst; int pold; } pend_t;
  pend_t pq[$];

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    flush = 0; fire = 0; in_valid = '0; in_reads = '0; in_alloc = '0; rt_valid = '0;
    for (int i = 0; i < W; i++) begin in_rs[i] = 0; in_rd[i] = 0; end
    for (int i = 0; i < RW; i++) begin rt_rd[i] = 0; rt_pdst[i] = 0; rt_pold[i] = 0; end
    for (int g = 0; g < NGPR; g++) begin smap[g] = g; rmap[g] = g; end
    for (int r = 0; r < NPHYS; r++) fr[r] = r >= NGPR;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int m [NGPR]; bit f2 [NPHYS]; bit eok; int nr;
      @(negedge clk);
      // group
      for (int i = 0; i < W; i++) begin
        in_valid[i] = $urandom_range(0, 3) != 0;
        in_alloc[i] = $urandom_range(0, 1);
        in_reads[i] = 1;
        in_rs[i] = gpr_t'($urandom_range(0, 7));   // few registers, many dependences
        in_rd[i] = gpr_t'($urandom_range(0, 7));
      end
      // retirement (oldest first)
      nr = 0;
      rt_valid = '0;
      while (nr < RW && nr < pq.size() && $urandom_range(0, 3) != 0) begin
        rt_valid[nr] = 1; rt_rd[nr] = gpr_t'(pq[nr].rd); rt_pdst[nr] = ptag_t'(pq[nr].pdst); rt_pold[nr] = ptag_t'(pq[nr].pold);
        nr++;
      end
      flush = $urandom_range(0, 49) == 0;
      // reference rename
      m = smap; f2 = fr; eok = 1;
      #1;
      for (int i = 0; i < W; i++) begin
        if (in_valid[i]) begin
          chk(int'(out_psrc[i]) == m[in_rs[i]], $sformatf("n=%0d psrc[%0d]=%0d want %0d", n, i, out_psrc[i], m[in_rs[i]]));
          chk(int'(out_pold[i]) == m[in_rd[i]], $sformatf("n=%0d pold[%0d]", n, i));
          if (in_alloc[i]) begin
            int r;
            r = -1;
            for (int k = 0; k < NPHYS && r < 0; k++) if (f2[k]) r = k;
            if (r < 0) eok = 0;
            else begin
              chk(int'(out_pdst[i]) == r, $sformatf("n=%0d pdst[%0d]=%0d want %0d", n, i, out_pdst[i], r));
              f2[r] = 0; m[in_rd[i]] = r;
            end
          end
        end
      end
      chk(ok == eok, $sformatf("n=%0d ok=%b want %b", n, ok, eok));
      fire = ok && !flush;
      // apply
      for (int i = 0; i < nr; i++) begin
        rmap[pq[0].rd] = pq[0].pdst; fr[pq[0].pold] = 1; void'(pq.pop_front());
      end
      if (flush) begin
        smap = rmap; pq.delete();
        for (int r = 0; r < NPHYS; r++) fr[r] = 1;
        for (int g = 0; g < NGPR; g++) fr[rmap[g]] = 0;
      end else if (fire) begin
        for (int i = 0; i < W; i++) if (in_valid[i] && in_alloc[i]) begin
          pend_t p;
          p.rd = in_rd[i]; p.pdst = out_pdst[i]; p.pold = smap[in_rd[i]];
          smap[in_rd[i]] = out_pdst[i]; fr[out_pdst[i]] = 0;
          pq.push_back(p);
        end
      end
      @(posedge clk);
      #1 {flush, fire, rt_valid} = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
