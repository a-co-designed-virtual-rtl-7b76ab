// tb_store_queue: self-checking test of a store queue copy.
//
// Stores are allocated in program order at increasing queue positions; some
// execute (broadcast address and data) out of order and the oldest executed
// store retires. Each cycle a load at a random position between head and tail
// searches the queue with an address from a small set. Expected: data of the
// youngest store older than the load whose address is known and equal. A
// flush empties the queue. Search is combinational; broadcasts are visible
// from the next cycle.
module tb_store_queue;
  import ildp_pkg::*;
  localparam int DEPTH = 32, NST = 8;
  logic clk = 0, rst_n = 0, flush, free_en, fwd_hit;
  stbc_t st [NST];
  qidx_t head, ld_pos;
  word_t ld_addr, fwd_data, head_addr, head_data;
  int checks = 0, failures = 0, hits = 0;

  store_queue #(.DEPTH(DEPTH), .NST(NST)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference, indexed by position mod 2*DEPTH
  bit    ex [2*DEPTH];
  word_t ad [2*DEPTH];
  word_t dt [2*DEPTH];
  int    hd = 0, tl = 0;   // head and tail as plain counters

  initial begin
    flush = 0; free_en = 0; head = 0; ld_pos = 0; ld_addr = 0;
    for (int j = 0; j < NST; j++) st[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int lp; bit eh; word_t ed;
      @(negedge clk);
      // allocate
      while (tl - hd < DEPTH && $urandom_range(0, 1)) begin ex[tl % (2*DEPTH)] = 0; tl++; end
      head = qidx_t'(hd % (2*DEPTH));
      // load search
      lp = hd + $urandom_range(0, tl - hd);
      ld_pos  = qidx_t'(lp % (2*DEPTH));
      ld_addr = 64'(8 * $urandom_range(0, 3));
      eh = 0; ed = '0;
      for (int p = lp - 1; p >= hd; p--)
        if (!eh && ex[p % (2*DEPTH)] && ad[p % (2*DEPTH)] == ld_addr) begin eh = 1; ed = dt[p % (2*DEPTH)]; end
      #1;
      checks++;
      if (fwd_hit !== eh || (eh && fwd_data !== ed)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d hit=%b want %b data=%h want %h", n, fwd_hit, eh, fwd_data, ed);
      end
      if (eh) hits++;
      // execute some stores
      for (int j = 0; j < NST; j++) begin
        int p;
        st[j] = '0;
        if (tl > hd && $urandom_range(0, 3) == 0) begin
          p = hd + $urandom_range(0, tl - hd - 1);
          if (!ex[p % (2*DEPTH)]) begin
            bit dup;
            dup = 0;
            for (int k = 0; k < j; k++) if (st[k].valid && st[k].sqpos == qidx_t'(p % (2*DEPTH))) dup = 1;
            if (!dup) begin
              st[j].valid = 1; st[j].sqpos = qidx_t'(p % (2*DEPTH));
              st[j].addr = 64'(8 * $urandom_range(0, 3)); st[j].data = {$urandom, $urandom};
            end
          end
        end
      end
      // retire the head if it executed
      free_en = (tl > hd) && ex[hd % (2*DEPTH)] && $urandom_range(0, 1);
      flush   = $urandom_range(0, 99) == 0;
      @(posedge clk);
      #1;
      for (int j = 0; j < NST; j++) if (st[j].valid) begin
        ex[st[j].sqpos] = 1; ad[st[j].sqpos] = st[j].addr; dt[st[j].sqpos] = st[j].data;
      end
      if (free_en) begin ex[hd % (2*DEPTH)] = 0; hd++; end
      if (flush) begin hd = 0; tl = 0; for (int i = 0; i < 2*DEPTH; i++) ex[i] = 0; end
      flush = 0; free_en = 0;
      for (int j = 0; j < NST; j++) st[j] = '0;
    end
    if (hits == 0) begin failures++; $display("FAIL no forwarding happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
