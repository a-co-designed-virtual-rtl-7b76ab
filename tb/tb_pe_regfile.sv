// tb_pe_regfile: self-checking test of a processing element's GPR copy.
//
// Applies random ready-bit clears (rename of a new destination) and random
// writes from up to NWR network ports to random physical registers, and checks
// the read port (value and ready bit) of every register against a reference
// after each cycle. At reset every register reads ready with value 0. When a
// clear and a write hit the same register in one cycle the write wins.
module tb_pe_regfile;
  import ildp_pkg::*;
  localparam int NPHYS = 192, NWR = 8, NCLR = 4;
  logic clk = 0, rst_n = 0;
  ptag_t rd_tag;
  word_t rd_value;
  logic  rd_ready;
  gwr_t  wr [NWR];
  logic [NCLR-1:0] clr_valid;
  ptag_t clr_tag [NCLR];
  int checks = 0, failures = 0;

  pe_regfile #(.NPHYS(NPHYS), .NWR(NWR), .NCLR(NCLR)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t rv [NPHYS];
  bit    rr [NPHYS];

  initial begin
    clr_valid = '0; rd_tag = 0;
    for (int j = 0; j < NWR; j++) wr[j] = '0;
    for (int i = 0; i < NCLR; i++) clr_tag[i] = 0;
    for (int i = 0; i < NPHYS; i++) begin rv[i] = 0; rr[i] = 1; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      bit used [NPHYS];
      @(negedge clk);
      for (int i = 0; i < NPHYS; i++) used[i] = 0;
      for (int i = 0; i < NCLR; i++) begin
        clr_valid[i] = $urandom_range(0, 1);
        clr_tag[i]   = ptag_t'($urandom_range(0, NPHYS-1));
        if (clr_valid[i]) rr[clr_tag[i]] = 0;
      end
      for (int j = 0; j < NWR; j++) begin
        int t;
        t = $urandom_range(0, NPHYS-1);
        wr[j] = '0;
        if ($urandom_range(0, 2) == 0 && !used[t]) begin   // distinct tags, as in the core
          used[t] = 1;
          wr[j].valid = 1; wr[j].tag = ptag_t'(t); wr[j].value = {$urandom, $urandom};
          rv[t] = wr[j].value; rr[t] = 1;
        end
      end
      @(negedge clk);
      clr_valid = '0;
      for (int j = 0; j < NWR; j++) wr[j] = '0;
      for (int i = 0; i < NPHYS; i++) begin
        rd_tag = ptag_t'(i);
        #1;   // no writes are driven, so clock edges here change nothing
        checks++;
        if (rd_ready !== rr[i] || (rr[i] && rd_value !== rv[i])) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d reg %0d ready=%b want %b value=%h want %h", n, i, rd_ready, rr[i], rd_value, rv[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
