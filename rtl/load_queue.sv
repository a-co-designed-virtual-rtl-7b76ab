// load_queue: shared load queue for memory ordering.
//
// Processing elements issue loads and stores out of program order with
// respect to each other. Each load gets a slot in program order at dispatch;
// when it executes it records its address here. When a store executes, its
// address is compared with every younger load that has already executed (the
// loads from the store's dispatch-time position to the tail, plus loads
// recording in the same cycle). A match is an ordering violation: the oldest
// offending load is reported so the reorder buffer can squash it and refetch
// from it when it reaches retirement. Slots are freed as loads retire.
// Sizes and full-word address matching are this design's choices.
module load_queue
  import ildp_pkg::*;
#(
  parameter int DEPTH = 32,
  parameter int NLD   = 8,
  parameter int NST   = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  input  qidx_t head,
  input  qidx_t tail,
  input  logic [3:0] free_n,   // loads retiring this cycle
  // loads recording their address
  input  logic  ld_valid [NLD],
  input  qidx_t ld_pos   [NLD],
  input  rtag_t ld_rtag  [NLD],
  input  word_t ld_addr  [NLD],
  // store broadcasts
  input  stbc_t st [NST],
  // violations
  output logic  viol_valid [NST],
  output rtag_t viol_rtag  [NST]
);
  localparam int AW = $clog2(DEPTH);

  logic [DEPTH-1:0] ex;
  word_t            addr [DEPTH];
  rtag_t            rtag [DEPTH];

  always_comb begin
    for (int j = 0; j < NST; j++) begin
      int first;
      int n;
      logic [AW-1:0] e;
      n             = 0;
      e             = '0;
      viol_valid[j] = 1'b0;
      viol_rtag[j]  = '0;
      first         = 2*DEPTH;
      if (st[j].valid) begin
        n = int'(qidx_t'(tail - st[j].lqpos) & qidx_t'(2*DEPTH-1));
        for (int i = 0; i < DEPTH; i++) begin
          e = AW'(st[j].lqpos) + AW'(i);
          if (i < n && ex[e] && addr[e] == st[j].addr && i < first) begin
            first         = i;
            viol_valid[j] = 1'b1;
            viol_rtag[j]  = rtag[e];
          end
          for (int k = 0; k < NLD; k++)
            if (i < n && ld_valid[k] && ld_pos[k][AW-1:0] == e &&
                ld_addr[k] == st[j].addr && i < first) begin
              first         = i;
              viol_valid[j] = 1'b1;
              viol_rtag[j]  = ld_rtag[k];
            end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ex <= '0;
    else if (flush) ex <= '0;
    else begin
      for (int i = 0; i < 8; i++)
        if (4'(i) < free_n) ex[AW'(head) + AW'(i)] <= 1'b0;
      for (int k = 0; k < NLD; k++)
        if (ld_valid[k]) ex[ld_pos[k][AW-1:0]] <= 1'b1;
    end
  end

  always_ff @(posedge clk)
    for (int k = 0; k < NLD; k++)
      if (ld_valid[k]) begin
        addr[ld_pos[k][AW-1:0]] <= ld_addr[k];
        rtag[ld_pos[k][AW-1:0]] <= ld_rtag[k];
      end
endmodule
