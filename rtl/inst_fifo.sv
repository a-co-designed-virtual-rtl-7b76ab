// inst_fifo: in-order instruction FIFO of one processing element.
//
// The steering logic may place several instructions of one dispatch group
// into the same FIFO; up to W of them are written per cycle, in slot order,
// and the head is removed by the processing element when it issues. The
// processing element sees only the head: issue is strictly in order, which is
// what lets a strand's accumulator stay local to the element with no wakeup
// logic. DEPTH is this design's choice (not given). `free` counts empty
// entries for the steering logic. Flush empties the FIFO.
module inst_fifo
  import ildp_pkg::*;
#(
  parameter int DEPTH = 16,
  parameter int W     = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,
  input  logic  [W-1:0]            in_valid,
  input  disp_t                    in_ent [W],
  output logic                     head_valid,
  output disp_t                    head,
  input  logic                     pop,
  output logic [$clog2(DEPTH):0]   free
);
  localparam int AW = $clog2(DEPTH);

  disp_t         mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;

  assign head_valid = count != 0;
  assign head       = mem[rd_ptr];
  assign free       = (AW+1)'(DEPTH) - count;

  logic [AW:0] npush;
  always_comb begin
    npush = '0;
    for (int i = 0; i < W; i++) npush += (AW+1)'(in_valid[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      rd_ptr <= rd_ptr + AW'(pop && head_valid);
      wr_ptr <= wr_ptr + AW'(npush);
      count  <= count + npush - (AW+1)'(pop && head_valid);
    end
  end

  always_ff @(posedge clk) begin
    logic [AW-1:0] p;
    p = wr_ptr;
    for (int i = 0; i < W; i++)
      if (in_valid[i] && !flush) begin
        mem[p] <= in_ent[i];
        p = p + 1'b1;
      end
  end

  // Steering never overfills the FIFO.
  assert property (@(posedge clk) disable iff (!rst_n) (count + npush <= (AW+1)'(DEPTH)));
endmodule
