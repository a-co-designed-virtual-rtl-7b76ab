// btb: branch target buffer, set associative, for register-indirect jumps.
//
// Fetch looks up the TPC of a jump instruction and, on a hit, follows the
// stored target TPC. Entries are written when a jump retires with the target
// it actually took (translated through the JTLT). Size and associativity
// follow the evaluated configuration (512 entries, 4 ways). Indexing by
// TPC[SETW:1] (16-bit parcels), the full TPC as tag and round-robin
// replacement per set are this design's choices. Lookup is combinational; an
// update that hits overwrites the hitting way, else the round-robin victim.
module btb
  import ildp_pkg::*;
#(
  parameter int ENTRIES = 512,
  parameter int WAYS    = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t lk_pc,
  output logic  lk_hit,
  output word_t lk_tgt,
  input  logic  up_en,
  input  word_t up_pc,
  input  word_t up_tgt
);
  localparam int SETS = ENTRIES / WAYS;
  localparam int SETW = $clog2(SETS);
  localparam int WW   = (WAYS > 1) ? $clog2(WAYS) : 1;

  logic  vld [SETS][WAYS];
  word_t tag [SETS][WAYS];
  word_t tgt [SETS][WAYS];
  logic [WW-1:0] rr [SETS];

  logic [SETW-1:0] lk_set, up_set;
  assign lk_set = lk_pc[SETW:1];
  assign up_set = up_pc[SETW:1];

  always_comb begin
    lk_hit = 1'b0;
    lk_tgt = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld[lk_set][w] && tag[lk_set][w] == lk_pc) begin
        lk_hit = 1'b1;
        lk_tgt = tgt[lk_set][w];
      end
  end

  logic          up_hit;
  logic [WW-1:0] up_way;
  always_comb begin
    up_hit = 1'b0;
    up_way = rr[up_set];
    for (int w = 0; w < WAYS; w++)
      if (vld[up_set][w] && tag[up_set][w] == up_pc) begin
        up_hit = 1'b1;
        up_way = WW'(w);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) vld[s][w] <= 1'b0;
      end
    end else if (up_en) begin
      vld[up_set][up_way] <= 1'b1;
      if (!up_hit) rr[up_set] <= rr[up_set] + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (up_en) begin
      tag[up_set][up_way] <= up_pc;
      tgt[up_set][up_way] <= up_tgt;
    end
  end
endmodule
