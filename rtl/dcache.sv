// dcache: one copy of the L1 data cache, modelled as always hitting.
//
// The data cache is replicated; each copy serves a subset of the processing
// elements through its own read ports, and every copy is written by each
// retiring store (write-through), so all copies hold the same data. This
// model holds the whole data space of WORDS 64-bit words (32 KB at the
// default, the evaluated L1 size) and never misses, as in the evaluation's
// perfect-cache configuration; tags, refills and the L2 behind it are not
// modelled. A read issued in cycle t returns its word in cycle t+LAT
// (LAT = 2, the evaluated hit latency). Addresses are byte addresses of
// aligned 64-bit words and wrap modulo the size. The init port writes a
// word directly (loading memory images before a run).
module dcache
  import ildp_pkg::*;
#(
  parameter int WORDS = 4096,
  parameter int NRD   = 4,
  parameter int LAT   = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rd_en   [NRD],
  input  word_t rd_addr [NRD],
  output word_t rd_data [NRD],
  input  logic  wr_en,
  input  word_t wr_addr,
  input  word_t wr_data
);
  localparam int AW = $clog2(WORDS);

  word_t mem [WORDS];
  word_t pipe [NRD][LAT];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr[AW+2:3]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NRD; p++)
        for (int s = 0; s < LAT; s++) pipe[p][s] <= '0;
    end else begin
      for (int p = 0; p < NRD; p++) begin
        pipe[p][0] <= rd_en[p] ? mem[rd_addr[p][AW+2:3]] : '0;
        for (int s = 1; s < LAT; s++) pipe[p][s] <= pipe[p][s-1];
      end
    end
  end

  always_comb
    for (int p = 0; p < NRD; p++) rd_data[p] = pipe[p][LAT-1];
endmodule
