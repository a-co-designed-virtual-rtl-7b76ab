// tb_load_queue: self-checking test of the shared load queue.
//
// Loads are allocated in program order and record their address out of
// order; retiring loads leave from the head. Each cycle random stores
// broadcast an address with the load-queue position that was the tail when
// the store dispatched. Expected: for each store, the oldest load at or after
// that position that has recorded (earlier, or in the same cycle) the same
// address, reported by its ROB tag; no report otherwise.
module tb_load_queue;
  import ildp_pkg::*;
  localparam int DEPTH = 32, NLD = 8, NST = 8;
  logic clk = 0, rst_n = 0, flush;
  qidx_t head, tail;
  logic [3:0] free_n;
  logic  ld_valid [NLD];
  qidx_t ld_pos   [NLD];
  rtag_t ld_rtag  [NLD];
  word_t ld_addr  [NLD];
  stbc_t st [NST];
  logic  viol_valid [NST];
  rtag_t viol_rtag  [NST];
  int checks = 0, failures = 0, viols = 0;

  load_queue #(.DEPTH(DEPTH), .NLD(NLD), .NST(NST)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit    ex [2*DEPTH];
  word_t ad [2*DEPTH];
  int    hd = 0, tl = 0;

  initial begin
    flush = 0; free_n = 0; head = 0; tail = 0;
    for (int k = 0; k < NLD; k++) begin ld_valid[k] = 0; ld_pos[k] = 0; ld_rtag[k] = 0; ld_addr[k] = 0; end
    for (int j = 0; j < NST; j++) st[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      bit nb [2*DEPTH]; word_t na [2*DEPTH];
      @(negedge clk);
      while (tl - hd < DEPTH && $urandom_range(0, 1)) begin ex[tl % (2*DEPTH)] = 0; tl++; end
      head = qidx_t'(hd % (2*DEPTH)); tail = qidx_t'(tl % (2*DEPTH));
      for (int i = 0; i < 2*DEPTH; i++) begin nb[i] = 0; na[i] = ad[i]; end
      for (int k = 0; k < NLD; k++) begin
        int p;
        ld_valid[k] = 0;
        if (tl > hd && $urandom_range(0, 2) == 0) begin
          p = (hd + $urandom_range(0, tl - hd - 1)) % (2*DEPTH);
          if (!ex[p] && !nb[p]) begin
            nb[p] = 1; na[p] = 64'(8 * $urandom_range(0, 3));
            ld_valid[k] = 1; ld_pos[k] = qidx_t'(p); ld_rtag[k] = rtag_t'(p + 100); ld_addr[k] = na[p];
          end
        end
      end
      for (int j = 0; j < NST; j++) begin
        st[j] = '0;
        if ($urandom_range(0, 1)) begin
          st[j].valid = 1;
          st[j].lqpos = qidx_t'((hd + $urandom_range(0, tl - hd)) % (2*DEPTH));
          st[j].addr  = 64'(8 * $urandom_range(0, 3));
        end
      end
      #1;
      for (int j = 0; j < NST; j++) begin
        bit ev; rtag_t er;
        ev = 0; er = '0;
        if (st[j].valid)
          for (int p = hd + ((int'(st[j].lqpos) - hd % (2*DEPTH) + 2*DEPTH) % (2*DEPTH)); p < tl; p++) begin
            int e;
            e = p % (2*DEPTH);
            if (!ev && ((ex[e] && ad[e] == st[j].addr) || (nb[e] && na[e] == st[j].addr))) begin
              ev = 1; er = rtag_t'(e + 100);
            end
          end
        checks++;
        if (viol_valid[j] !== ev || (ev && viol_rtag[j] !== er)) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d st%0d viol=%b want %b rtag=%0d want %0d hd=%0d tl=%0d lq=%0d", n, j, viol_valid[j], ev, viol_rtag[j], er, hd, tl, st[j].lqpos);
        end
        if (ev) viols++;
      end
      // retire up to 8 loads that recorded their address in an earlier cycle
      free_n = 0;
      while (free_n < 8 && hd + int'(free_n) < tl && ex[(hd + int'(free_n)) % (2*DEPTH)] && $urandom_range(0, 3) != 0)
        free_n++;
      flush = $urandom_range(0, 99) == 0;
      @(posedge clk);
      #1;
      for (int i = 0; i < 2*DEPTH; i++) if (nb[i]) begin ex[i] = 1; ad[i] = na[i]; end
      for (int i = 0; i < int'(free_n); i++) ex[(hd + i) % (2*DEPTH)] = 0;
      hd += int'(free_n);
      if (flush) begin hd = 0; tl = 0; for (int i = 0; i < 2*DEPTH; i++) ex[i] = 0; end
      flush = 0; free_n = 0;
      for (int k = 0; k < NLD; k++) ld_valid[k] = 0;
      for (int j = 0; j < NST; j++) st[j] = '0;
    end
    if (viols == 0) begin failures++; $display("FAIL no violation happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
