// tb_global_net: self-checking test of the global result broadcast network.
//
// Drives a random result from every PE each cycle and checks out[p][q]: PE q's
// own copy (p == q) sees the result in the same cycle, every other PE sees it
// LAT cycles later. A flush drops the values in flight. The test runs the
// network at LAT = 2, the slowest configuration; LAT = 0 is a pure wire.
module tb_global_net;
  import ildp_pkg::*;
  localparam int NPE = 8, LAT = 2;
  logic clk = 0, rst_n = 0, flush;
  gwr_t in  [NPE];
  gwr_t out [NPE][NPE];
  int checks = 0, failures = 0;

  global_net #(.NPE(NPE), .LAT(LAT)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  gwr_t hist [LAT+1][NPE];   // hist[k]: inputs k cycles ago

  initial begin
    flush = 0;
    for (int q = 0; q < NPE; q++) begin
      in[q] = '0;
      for (int k = 0; k <= LAT; k++) hist[k][q] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int k = LAT; k > 0; k--) hist[k] = hist[k-1];
      for (int q = 0; q < NPE; q++) begin
        in[q].valid = $urandom_range(0, 1);
        in[q].tag   = ptag_t'($urandom);
        in[q].value = {$urandom, $urandom};
        hist[0][q]  = in[q];
      end
      #1;
      for (int p = 0; p < NPE; p++)
        for (int q = 0; q < NPE; q++) begin
          gwr_t e;
          e = (p == q) ? hist[0][q] : hist[LAT][q];
          checks++;
          if (out[p][q] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d out[%0d][%0d]=%p want %p", n, p, q, out[p][q], e);
          end
        end
      flush = ($urandom_range(0, 31) == 0);
      if (flush)   // everything now in the pipeline is dropped
        for (int k = 0; k <= LAT; k++) for (int q = 0; q < NPE; q++) hist[k][q] = '0;
      @(posedge clk);
      #1 flush = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
