// tb_btb: self-checking test of the branch target buffer.
//
// A reference model keeps, per set, up to WAYS (pc, target) pairs with a
// round-robin victim pointer that advances on each allocation (not on an
// update of a present entry). Random updates over a small PC range force
// conflicts and replacements; after each update a lookup of the updated PC
// and of a random PC are checked. Lookups are combinational, updates are seen
// from the next cycle.
module tb_btb;
  import ildp_pkg::*;
  localparam int ENTRIES = 512, WAYS = 4, SETS = ENTRIES / WAYS;
  logic clk = 0, rst_n = 0;
  word_t lk_pc, lk_tgt, up_pc, up_tgt;
  logic  lk_hit, up_en;
  int checks = 0, failures = 0;

  btb #(.ENTRIES(ENTRIES), .WAYS(WAYS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t rtag [SETS][WAYS];
  word_t rtgt [SETS][WAYS];
  bit    rv   [SETS][WAYS];
  int    rrr  [SETS];

  function automatic int set_of(word_t pc);
    return int'(pc[7:1]);
  endfunction

  task automatic look(word_t pc);
    bit h; word_t t; int s;
    s = set_of(pc); h = 0; t = '0;
    for (int w = 0; w < WAYS; w++) if (rv[s][w] && rtag[s][w] == pc) begin h = 1; t = rtgt[s][w]; end
    lk_pc = pc;
    #1;
    checks++;
    if (lk_hit !== h || (h && lk_tgt !== t)) begin
      failures++;
      $display("FAIL pc=%h hit=%b want %b tgt=%h want %h", pc, lk_hit, h, lk_tgt, t);
    end
  endtask

  initial begin
    up_en = 0; up_pc = 0; up_tgt = 0; lk_pc = 0;
    for (int s = 0; s < SETS; s++) begin rrr[s] = 0; for (int w = 0; w < WAYS; w++) rv[s][w] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      word_t pc; int s, way; bit hit;
      @(negedge clk);
      pc = {50'h0, 13'($urandom_range(0, 2047)), 1'b0};  // 8 PCs per set on average
      up_en = 1; up_pc = pc; up_tgt = {$urandom, $urandom};
      s = set_of(pc); hit = 0; way = rrr[s];
      for (int w = 0; w < WAYS; w++) if (rv[s][w] && rtag[s][w] == pc) begin hit = 1; way = w; end
      rv[s][way] = 1; rtag[s][way] = pc; rtgt[s][way] = up_tgt;
      if (!hit) rrr[s] = (rrr[s] + 1) % WAYS;
      @(negedge clk);
      up_en = 0;
      look(pc);
      look({50'h0, 13'($urandom_range(0, 2047)), 1'b0});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
