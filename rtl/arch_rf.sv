// arch_rf: architected register file.
//
// Holds the V-ISA register state, written in program order as instructions
// retire: both the values that other strands also receive through the
// physical registers and the values that live only in an accumulator but
// must be recoverable at a trap. It sits off the execution path, so its only
// reader is state inspection (trap recovery by the translator, tests); all
// registers are exposed. Up to NW writes per cycle; a later port wins when two
// retiring instructions write the same register. Reset clears it.
module arch_rf
  import ildp_pkg::*;
#(
  parameter int NW = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NW-1:0] wr_en,
  input  gpr_t          wr_rd    [NW],
  input  word_t         wr_value [NW],
  output word_t         regs     [NGPR]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < NGPR; g++) regs[g] <= '0;
    end else begin
      for (int i = 0; i < NW; i++)
        if (wr_en[i]) regs[wr_rd[i]] <= wr_value[i];
    end
  end
endmodule
