// tb_dual_ras: self-checking test of the dual (SPC, TPC) return address stack.
//
// Drives random pushes and pops on the speculative side, the same operations
// later on the committed side, and occasional restores, and compares the
// speculative top of stack with two reference stacks held as queues. A
// restore must make the speculative stack equal to the committed one,
// including a committed push or pop in the same cycle. The stacks wrap at
// DEPTH entries; the test keeps the depth below that.
module tb_dual_ras;
  import ildp_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic s_push, s_pop, c_push, c_pop, restore;
  word_t s_push_spc, s_push_tpc, s_top_spc, s_top_tpc, c_push_spc, c_push_tpc;
  int checks = 0, failures = 0;

  dual_ras #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { word_t spc; word_t tpc; } pr_t;
  pr_t sq[$], cq[$], pend[$];   // speculative, committed, ops not yet committed (pushes)
  bit  pend_push[$];

  initial begin
    {s_push, s_pop, c_push, c_pop, restore} = '0;
    s_push_spc = 0; s_push_tpc = 0; c_push_spc = 0; c_push_tpc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      int r;
      {s_push, s_pop, c_push, c_pop, restore} = '0;
      r = $urandom_range(0, 9);
      // speculative side
      if (r < 4 && sq.size() < DEPTH - 2) begin
        pr_t p;
        p.spc = {$urandom, $urandom}; p.tpc = {$urandom, $urandom};
        s_push = 1; s_push_spc = p.spc; s_push_tpc = p.tpc;
        sq.push_back(p); pend.push_back(p); pend_push.push_back(1);
      end else if (r < 7 && sq.size() > 0) begin
        s_pop = 1;
        pend.push_back(sq[$]); pend_push.push_back(0);
        void'(sq.pop_back());
      end
      // committed side replays the oldest pending speculative operation
      if (pend.size() > 0 && $urandom_range(0, 1) == 1 && !(s_push || s_pop)) begin
        if (pend_push[0]) begin
          c_push = 1; c_push_spc = pend[0].spc; c_push_tpc = pend[0].tpc; cq.push_back(pend[0]);
        end else begin
          c_pop = 1; void'(cq.pop_back());
        end
        void'(pend.pop_front()); void'(pend_push.pop_front());
        if ($urandom_range(0, 7) == 0) begin
          restore = 1; sq = cq; pend.delete(); pend_push.delete();
        end
      end
      @(negedge clk);
      {s_push, s_pop, c_push, c_pop, restore} = '0;
      #1;
      if (sq.size() > 0) begin
        checks++;
        if (s_top_spc !== sq[$].spc || s_top_tpc !== sq[$].tpc) begin
          failures++;
          $display("FAIL n=%0d top %h/%h want %h/%h", n, s_top_spc, s_top_tpc, sq[$].spc, sq[$].tpc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
