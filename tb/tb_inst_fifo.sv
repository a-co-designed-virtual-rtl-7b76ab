// tb_inst_fifo: self-checking test of a processing element's instruction FIFO.
//
// Pushes 0..W entries per cycle (never beyond the free count, as steering
// guarantees), pops at random and flushes now and then. A reference queue
// gives the expected head, head_valid and free count after every cycle.
module tb_inst_fifo;
  import ildp_pkg::*;
  localparam int DEPTH = 16, W = 4;
  logic clk = 0, rst_n = 0, flush, pop, head_valid;
  logic [W-1:0] in_valid;
  disp_t in_ent [W];
  disp_t head;
  logic [$clog2(DEPTH):0] free;
  int checks = 0, failures = 0;

  inst_fifo #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rtag_t q[$];
  int    seq = 0;

  initial begin
    flush = 0; pop = 0; in_valid = '0;
    for (int i = 0; i < W; i++) in_ent[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int room, k;
      @(negedge clk);
      #1;
      checks++;
      if (head_valid !== (q.size() != 0) || int'(free) != DEPTH - q.size() ||
          (q.size() != 0 && head.rtag !== q[0])) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d valid=%b free=%0d head=%0d want size %0d head %0d", n, head_valid, free, head.rtag, q.size(), q.size() ? q[0] : 0);
      end
      pop   = $urandom_range(0, 2) != 0;
      flush = $urandom_range(0, 63) == 0;
      room  = DEPTH - q.size();
      in_valid = '0;
      k = 0;
      for (int i = 0; i < W; i++) begin
        in_ent[i] = '0;
        if ($urandom_range(0, 1) && k < room) begin   // gaps between valid slots are allowed
          in_valid[i] = 1; in_ent[i].rtag = rtag_t'(seq); in_ent[i].pc = 64'(seq);
          k++;
        end
      end
      if (flush) q.delete();
      else begin
        if (pop && q.size() != 0) void'(q.pop_front());
        for (int i = 0; i < W; i++) if (in_valid[i]) begin q.push_back(rtag_t'(seq)); end
      end
      seq++;
      @(posedge clk);
      #1 {flush, pop, in_valid} = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
