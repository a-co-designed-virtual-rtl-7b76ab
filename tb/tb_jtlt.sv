// tb_jtlt: self-checking test of the jump target-address lookup table.
//
// Fills entries through the software write port and looks up SPCs against a
// reference associative array that keeps, per direct-mapped index, the last
// SPC written there. Checks hits, misses (never-written SPCs and SPCs evicted
// by a conflicting write) and the returned TPC. Lookups are combinational; a
// write is visible from the next cycle.
module tb_jtlt;
  import ildp_pkg::*;
  localparam int ENTRIES = 256;
  logic clk = 0, rst_n = 0;
  word_t lk_spc, lk_tpc, wr_spc, wr_tpc;
  logic  lk_hit, wr_en;
  int checks = 0, failures = 0;

  jtlt #(.ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t ref_spc [ENTRIES];
  word_t ref_tpc [ENTRIES];
  logic  ref_v   [ENTRIES];

  task automatic look(word_t spc);
    int i;
    i = int'(spc[9:2]);
    lk_spc = spc;
    #1;
    checks++;
    if (ref_v[i] && ref_spc[i] == spc) begin
      if (lk_hit !== 1'b1 || lk_tpc !== ref_tpc[i]) begin
        failures++;
        $display("FAIL hit expected spc=%h got hit=%b tpc=%h want %h", spc, lk_hit, lk_tpc, ref_tpc[i]);
      end
    end else if (lk_hit !== 1'b0) begin
      failures++;
      $display("FAIL miss expected spc=%h", spc);
    end
  endtask

  initial begin
    wr_en = 0; wr_spc = 0; wr_tpc = 0; lk_spc = 0;
    for (int i = 0; i < ENTRIES; i++) ref_v[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    look(64'h1000);                        // empty table misses
    for (int n = 0; n < 600; n++) begin
      word_t s;
      @(negedge clk);
      s = {32'h0, $urandom} & 64'h0000_0000_0000_7ffc;   // word-aligned SPCs, many conflicts
      if ($urandom_range(0, 2) != 0) begin
        wr_en = 1; wr_spc = s; wr_tpc = {$urandom, $urandom};
        @(negedge clk);
        wr_en = 0;
        ref_v[int'(s[9:2])] = 1; ref_spc[int'(s[9:2])] = s; ref_tpc[int'(s[9:2])] = wr_tpc;
      end
      look(s);
      look({32'h0, $urandom} & 64'h0000_0000_0000_7ffc);
      look(s ^ 64'h1_0000_0000);           // same index, different tag
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
