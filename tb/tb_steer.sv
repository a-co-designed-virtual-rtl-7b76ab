// tb_steer: self-checking test of dependence-based steering.
//
// Random groups of instructions that continue, start or end accumulator
// strands (or use no accumulator) are steered against random FIFO free
// counts. The reference keeps the accumulator-to-PE map and applies the
// policy: an instruction on a mapped accumulator goes to that PE; a strand
// start on an unmapped accumulator takes the lowest-numbered PE no live
// strand owns; an instruction without accumulator goes to the PE with the
// most FIFO room; the group is refused if any chosen FIFO would overflow.
// Checked every cycle: ok, the chosen PE per slot, and the strand start/end
// flags. The map changes only when the group fires.
module tb_steer;
  import ildp_pkg::*;
  localparam int NPE = 8, W = 4, FW = 5;
  logic clk = 0, rst_n = 0, flush, ok, fire;
  logic [W-1:0] in_valid, in_rd_acc, in_wr_acc, in_eos, st_new, st_end;
  acc_t in_acc [W];
  logic [FW-1:0] fifo_free [NPE];
  logic [2:0] out_pe [W];
  int checks = 0, failures = 0, news = 0, refused = 0;

  steer #(.NPE(NPE), .W(W), .FW(FW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit av [NACC];
  int ap [NACC];

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    flush = 0; fire = 0; in_valid = '0; in_rd_acc = '0; in_wr_acc = '0; in_eos = '0;
    for (int i = 0; i < W; i++) in_acc[i] = 0;
    for (int a = 0; a < NACC; a++) begin av[a] = 0; ap[a] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      bit v [NACC]; int p [NACC]; int room [NPE]; bit eok;
      @(negedge clk);
      for (int q = 0; q < NPE; q++) begin
        fifo_free[q] = FW'($urandom_range(0, 3) == 0 ? 0 : $urandom_range(1, 16));
        room[q] = fifo_free[q];
      end
      for (int i = 0; i < W; i++) begin
        int k;
        in_valid[i] = $urandom_range(0, 4) != 0;
        k = $urandom_range(0, 5);
        in_rd_acc[i] = k <= 2;            // continue a strand
        in_wr_acc[i] = k != 5;            // k == 3, 4: start a strand; k == 5: no accumulator
        in_eos[i]    = (k <= 2) && $urandom_range(0, 2) == 0;
        in_acc[i]    = acc_t'($urandom_range(0, NACC-1));
      end
      flush = $urandom_range(0, 99) == 0;
      v = av; p = ap; eok = 1;
      #1;
      for (int i = 0; i < W; i++) if (in_valid[i]) begin
        int e; bit nw; bit owned [NPE];
        for (int q = 0; q < NPE; q++) owned[q] = 0;
        for (int a = 0; a < NACC; a++) if (v[a]) owned[p[a]] = 1;
        nw = 0;
        if (in_rd_acc[i] || in_wr_acc[i]) begin
          if (v[in_acc[i]]) begin
            e = p[in_acc[i]];
            nw = !in_rd_acc[i];
          end else begin
            e = -1;
            for (int q = 0; q < NPE && e < 0; q++) if (!owned[q]) e = q;
            nw = 1;
          end
          v[in_acc[i]] = !in_eos[i]; p[in_acc[i]] = e;
        end else begin
          int best;
          best = -1; e = 0;
          for (int q = 0; q < NPE; q++) if (room[q] > best) begin best = room[q]; e = q; end
        end
        if (room[e] == 0) eok = 0;
        room[e]--;
        chk(int'(out_pe[i]) == e, $sformatf("n=%0d slot %0d pe=%0d want %0d", n, i, out_pe[i], e));
        chk(st_new[i] == nw && st_end[i] == ((in_rd_acc[i] || in_wr_acc[i]) && in_eos[i]),
            $sformatf("n=%0d slot %0d new/end flags", n, i));
        if (nw) news++;
      end
      chk(ok == eok, $sformatf("n=%0d ok=%b want %b", n, ok, eok));
      if (!eok) refused++;
      fire = ok && !flush && $urandom_range(0, 3) != 0;
      if (flush) for (int a = 0; a < NACC; a++) av[a] = 0;
      else if (fire) begin av = v; ap = p; end
      @(posedge clk);
      #1 {flush, fire} = '0;
    end
    if (news == 0 || refused == 0) begin failures++; $display("FAIL strand starts or refusals never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
