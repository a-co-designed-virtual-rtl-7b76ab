// global_net: global communication network between processing elements.
//
// Each processing element may broadcast one GPR result per cycle. A result
// reaches the producing element's own register file copy at once (internal
// bypass) and every other copy LAT cycles later, modelling the wire latency of
// the global bypass (the evaluation uses 0, 1 and 2 cycles). With LAT = 0 a
// value written at the end of the producing cycle can be read by a consumer in
// any element in the next cycle. A flush drops the values in flight.
// out[p][q] is the write from element q as seen by element p.
module global_net
  import ildp_pkg::*;
#(
  parameter int NPE = 8,
  parameter int LAT = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic flush,
  input  gwr_t in  [NPE],
  output gwr_t out [NPE][NPE]
);
  gwr_t delayed [NPE];

  if (LAT == 0) begin : g_direct
    assign delayed = in;
  end else begin : g_pipe
    gwr_t pipe [LAT][NPE];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < LAT; s++)
          for (int q = 0; q < NPE; q++) pipe[s][q] <= '0;
      end else begin
        for (int q = 0; q < NPE; q++) begin
          pipe[0][q] <= flush ? '0 : in[q];
          for (int s = 1; s < LAT; s++) pipe[s][q] <= flush ? '0 : pipe[s-1][q];
        end
      end
    end
    assign delayed = pipe[LAT-1];
  end

  always_comb
    for (int p = 0; p < NPE; p++)
      for (int q = 0; q < NPE; q++)
        out[p][q] = (p == q) ? in[q] : delayed[q];
endmodule
