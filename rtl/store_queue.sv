// store_queue: one replica of the store queue.
//
// Every processing element keeps its own copy of the store queue so that its
// loads can search for older stores locally; all copies receive the same
// store broadcasts over the memory ordering network and so hold the same
// contents. A slot is assigned to each store in program order at dispatch
// (its position, with a wrap bit, travels with the store), filled with
// address and data when the store executes, and freed when the store
// retires and writes the data cache.
//
// A load carries the queue tail it saw at dispatch: every slot from the head
// up to that position holds an older store. The search returns the data of
// the youngest older store whose address is known and equal (store-to-load
// forwarding). Older stores whose address is still unknown are ignored: the
// load proceeds speculatively and the load queue catches a violation later.
// Sizes, the search and full-word matching are this design's choices.
module store_queue
  import ildp_pkg::*;
#(
  parameter int DEPTH = 32,
  parameter int NST   = 8     // store broadcasts per cycle
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  input  stbc_t st [NST],
  input  logic  free_en,       // the head store retired
  input  qidx_t head,          // position of the oldest store
  // load search
  input  qidx_t ld_pos,
  input  word_t ld_addr,
  output logic  fwd_hit,
  output word_t fwd_data,
  // head entry (for retirement)
  output word_t head_addr,
  output word_t head_data
);
  localparam int AW = $clog2(DEPTH);

  logic [DEPTH-1:0] av;     // address (and data) known
  word_t            addr [DEPTH];
  word_t            data [DEPTH];

  assign head_addr = addr[head[AW-1:0]];
  assign head_data = data[head[AW-1:0]];

  always_comb begin
    int            cnt;
    logic [AW-1:0] e;
    fwd_hit  = 1'b0;
    fwd_data = '0;
    cnt      = int'(qidx_t'(ld_pos - head) & qidx_t'(2*DEPTH-1));
    for (int i = 1; i <= DEPTH; i++) begin
      e = AW'(ld_pos) - AW'(i);
      if (!fwd_hit && i <= cnt && av[e] && addr[e] == ld_addr) begin
        fwd_hit  = 1'b1;
        fwd_data = data[e];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) av <= '0;
    else if (flush) av <= '0;
    else begin
      if (free_en) av[head[AW-1:0]] <= 1'b0;
      for (int j = 0; j < NST; j++)
        if (st[j].valid) av[st[j].sqpos[AW-1:0]] <= 1'b1;
    end
  end

  always_ff @(posedge clk)
    for (int j = 0; j < NST; j++)
      if (st[j].valid) begin
        addr[st[j].sqpos[AW-1:0]] <= st[j].addr;
        data[st[j].sqpos[AW-1:0]] <= st[j].data;
      end
endmodule
