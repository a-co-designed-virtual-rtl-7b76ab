// tb_dcache: self-checking test of one data cache copy.
//
// Fills part of the array through the write port, then issues random reads
// on all NRD ports every cycle while writes continue, and checks that each
// read returns the word as it was when the read was issued exactly LAT cycles
// earlier (2 cycles at the default), and 0 on a port that was not enabled.
module tb_dcache;
  import ildp_pkg::*;
  localparam int WORDS = 4096, NRD = 4, LAT = 2;
  logic clk = 0, rst_n = 0;
  logic  rd_en   [NRD];
  word_t rd_addr [NRD];
  word_t rd_data [NRD];
  logic  wr_en;
  word_t wr_addr, wr_data;
  int checks = 0, failures = 0;

  dcache #(.WORDS(WORDS), .NRD(NRD), .LAT(LAT)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int USED = 64;
  word_t m [USED];
  word_t expq [NRD][$];

  initial begin
    wr_en = 0; wr_addr = 0; wr_data = 0;
    for (int p = 0; p < NRD; p++) begin rd_en[p] = 0; rd_addr[p] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < USED; i++) begin     // words at byte address 0x8000 + 8*i
      @(negedge clk);
      wr_en = 1; wr_addr = 64'h8000 + 64'(8*i); wr_data = {$urandom, $urandom}; m[i] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int p = 0; p < NRD; p++) for (int k = 0; k < LAT; k++) expq[p].push_back('0);
    for (int n = 0; n < 2000; n++) begin
      // outputs now show reads issued LAT cycles ago
      for (int p = 0; p < NRD; p++) begin
        word_t e;
        e = expq[p].pop_front();
        checks++;
        if (rd_data[p] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d port %0d data=%h want %h", n, p, rd_data[p], e);
        end
      end
      for (int p = 0; p < NRD; p++) begin
        int i;
        i = $urandom_range(0, USED-1);
        rd_en[p] = $urandom_range(0, 3) != 0;
        rd_addr[p] = 64'h8000 + 64'(8*i);
        expq[p].push_back(rd_en[p] ? m[i] : '0);   // read sees the array before this edge's write
      end
      wr_en = $urandom_range(0, 1);
      if (wr_en) begin
        int i;
        i = $urandom_range(0, USED-1);
        wr_addr = 64'h8000 + 64'(8*i); wr_data = {$urandom, $urandom};
        m[i] = wr_data;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
