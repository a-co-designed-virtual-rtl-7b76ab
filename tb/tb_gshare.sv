// tb_gshare: self-checking test of the gshare direction predictor.
//
// A reference model keeps the 2-bit counters (reset weakly not-taken), the
// speculative history shifted by predictions and the committed history
// shifted by training. Random predictions, trainings and restores are applied
// and the prediction and history outputs are compared every cycle. Prediction
// is combinational; updates take effect at the next clock edge.
module tb_gshare;
  import ildp_pkg::*;
  localparam int ENTRIES = 16384, HIST = 12, IW = 14;
  logic clk = 0, rst_n = 0;
  word_t pr_pc, up_pc;
  logic pr_taken, pr_shift, up_en, up_taken, restore;
  logic [HIST-1:0] pr_hist, up_hist;
  int checks = 0, failures = 0;

  gshare #(.ENTRIES(ENTRIES), .HIST(HIST)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned ctr [int];
  logic [HIST-1:0] sh, ch;
  function automatic int ix(word_t pc, logic [HIST-1:0] h);
    return int'(pc[IW:1] ^ IW'(h));
  endfunction
  function automatic int unsigned getc(int i);
    return ctr.exists(i) ? ctr[i] : 1;
  endfunction

  initial begin
    pr_pc = 0; up_pc = 0; pr_shift = 0; up_en = 0; up_taken = 0; restore = 0; up_hist = 0;
    sh = 0; ch = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      bit exp_t;
      int i;
      pr_pc    = {48'h0, 14'($urandom_range(0, 63)), 2'b00};   // few branches so counters saturate
      pr_shift = $urandom_range(0, 1);
      up_en    = $urandom_range(0, 1);
      up_pc    = {48'h0, 14'($urandom_range(0, 63)), 2'b00};
      up_hist  = HIST'($urandom_range(0, 3));
      up_taken = up_pc[2] ^ up_hist[0];
      restore  = ($urandom_range(0, 15) == 0);
      #1;
      exp_t = getc(ix(pr_pc, sh)) >= 2;
      checks++;
      if (pr_taken !== exp_t || pr_hist !== sh) begin
        failures++;
        $display("FAIL n=%0d taken=%b want %b hist=%h want %h", n, pr_taken, exp_t, pr_hist, sh);
      end
      // reference update
      if (up_en) begin
        i = ix(up_pc, up_hist);
        if (up_taken && getc(i) != 3) ctr[i] = getc(i) + 1;
        else if (!up_taken && getc(i) != 0) ctr[i] = getc(i) - 1;
        ch = {ch[HIST-2:0], up_taken};
      end
      if (restore) sh = ch;
      else if (pr_shift) sh = {sh[HIST-2:0], exp_t};
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
