// tb_arch_rf: self-checking test of the architected register file.
//
// Writes random values through up to NW ports per cycle (distinct registers
// in one cycle, as retirement produces) and compares all 64 registers with a
// reference after every cycle. Registers read 0 after reset.
module tb_arch_rf;
  import ildp_pkg::*;
  localparam int NW = 4;
  logic clk = 0, rst_n = 0;
  logic [NW-1:0] wr_en;
  gpr_t  wr_rd    [NW];
  word_t wr_value [NW];
  word_t regs     [NGPR];
  int checks = 0, failures = 0;

  arch_rf #(.NW(NW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t r [NGPR];
  initial begin
    wr_en = '0;
    for (int i = 0; i < NW; i++) begin wr_rd[i] = 0; wr_value[i] = 0; end
    for (int g = 0; g < NGPR; g++) r[g] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int i = 0; i < NW; i++) begin
        wr_en[i]    = $urandom_range(0, 1);
        wr_rd[i]    = gpr_t'(i * 16 + $urandom_range(0, 15));
        wr_value[i] = {$urandom, $urandom};
        if (wr_en[i]) r[wr_rd[i]] = wr_value[i];
      end
      @(negedge clk);
      wr_en = '0;
      for (int g = 0; g < NGPR; g++) begin
        checks++;
        if (regs[g] !== r[g]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d r%0d=%h want %h", n, g, regs[g], r[g]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
