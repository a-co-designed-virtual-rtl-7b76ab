// pe_regfile: one replica of the physical GPR file, private to a processing
// element.
//
// Every processing element keeps a full copy of the physical registers with
// one read port and one write port per processing element, so no copy needs
// many read ports. Each entry has a ready bit: it is cleared when the register
// is allocated to a new value at rename and set when the value arrives over
// the global communication network (or, for the element's own results, over
// the internal bypass). The element reads value and ready bit together before
// issue (operands are captured before issue; no wakeup). At reset every
// register holds zero and is ready; registers 0..NGPR-1 are the initial
// mapping. Writes land at the clock edge; reads are combinational.
module pe_regfile
  import ildp_pkg::*;
#(
  parameter int NPHYS = 192,
  parameter int NWR   = 8,
  parameter int NCLR  = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  ptag_t           rd_tag,
  output word_t           rd_value,
  output logic            rd_ready,
  input  gwr_t            wr [NWR],
  input  logic [NCLR-1:0] clr_valid,
  input  ptag_t           clr_tag [NCLR]
);
  word_t            val [NPHYS];
  logic [NPHYS-1:0] rdy;

  assign rd_value = val[rd_tag];
  assign rd_ready = rdy[rd_tag];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdy <= '1;
      for (int i = 0; i < NPHYS; i++) val[i] <= '0;
    end else begin
      for (int i = 0; i < NCLR; i++)
        if (clr_valid[i]) rdy[clr_tag[i]] <= 1'b0;
      for (int j = 0; j < NWR; j++)
        if (wr[j].valid) begin
          rdy[wr[j].tag] <= 1'b1;
          val[wr[j].tag] <= wr[j].value;
        end
    end
  end
endmodule
