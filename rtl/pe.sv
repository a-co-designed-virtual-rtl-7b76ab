// pe: processing element of the ILDP core.
//
// A processing element runs the strands steered to it, strictly in order from
// its instruction FIFO, on one non-pipelined functional unit. It holds one
// physical accumulator, a private copy of the physical GPR file and a private
// copy of the store queue. Operands are captured before issue: the FIFO head
// issues when its GPR source is ready in the local copy; the accumulator is
// always ready because only this element writes it and it runs in order.
//
//   ALU        result in the issue cycle; written to the accumulator, to the
//              local GPR copy and the network (write kind "global") and to the
//              reorder buffer.
//   load       address = base + offset; the local store queue is searched and
//              the data cache read in the issue cycle; the element waits for
//              the data (DC_LAT cycles), taking forwarded store data if an
//              older store matched. The address is recorded in the load queue.
//   store      address and data are broadcast to every store queue copy and
//              checked against the load queue; the store completes at once
//              and writes the cache at retirement.
//   branch     outcome from the accumulator, reported to the reorder buffer.
//   jump       SPC read from the GPR, reported for resolution at retirement.
//   JTLT write SPC (GPR) and TPC (accumulator) reported for retirement.
//   push, halt complete at once.
//
// Operand modes: A op R, R op A, A op Imm, R (copy) and Imm (set). The
// structure (FIFO, GPR copy, accumulator, functional unit, store queue, data
// cache port, links to the global network, reorder buffer and memory ordering
// network) follows the processing element diagram; the timing details are
// this design's choices. A flush empties the FIFO and abandons a load.
module pe
  import ildp_pkg::*;
#(
  parameter int NPE        = 8,
  parameter int W          = 4,
  parameter int FIFO_DEPTH = 16,
  parameter int NPHYS      = 192,
  parameter int SQ_DEPTH   = 32,
  parameter int DC_LAT     = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   flush,
  // dispatch
  input  logic [W-1:0]  in_valid,
  input  disp_t         in_ent [W],
  output logic [$clog2(FIFO_DEPTH):0] fifo_free,
  // register file writes and ready-bit clears
  input  gwr_t          gwr_in [NPE],
  input  logic [W-1:0]  clr_valid,
  input  ptag_t         clr_tag [W],
  // results
  output gwr_t          gwr_out,
  output cmpl_t         cmpl,
  output stbc_t         st_out,
  // store queue copy
  input  stbc_t         st_in [NPE],
  input  logic          sq_free,
  input  qidx_t         sq_head,
  // load queue record
  output logic          lq_valid,
  output qidx_t         lq_pos,
  output rtag_t         lq_rtag,
  output word_t         lq_addr,
  // data cache port
  output logic          dc_rd_en,
  output word_t         dc_rd_addr,
  input  word_t         dc_rd_data,
  // activity
  output logic          busy_issue,   // an instruction issued
  output logic          stall_opnd,   // head waited for a GPR operand
  output logic          fwd_used      // a load took forwarded store data
);
  logic  head_v;
  disp_t head;
  logic  pop;

  inst_fifo #(.DEPTH(FIFO_DEPTH), .W(W)) u_fifo (
    .clk, .rst_n, .flush, .in_valid, .in_ent,
    .head_valid(head_v), .head, .pop, .free(fifo_free)
  );

  word_t r_val;
  logic  r_rdy;
  pe_regfile #(.NPHYS(NPHYS), .NWR(NPE), .NCLR(W)) u_rf (
    .clk, .rst_n, .rd_tag(head.psrc), .rd_value(r_val), .rd_ready(r_rdy),
    .wr(gwr_in), .clr_valid, .clr_tag
  );

  word_t acc;
  uop_t  u;
  assign u = head.uop;

  // load in flight
  logic               ld_busy;
  logic [3:0]         ld_cnt;
  disp_t              ld_ent;
  logic               ld_fwd;
  word_t              ld_fwd_data;

  logic  fwd_hit;
  word_t fwd_data;
  word_t ea;

  store_queue #(.DEPTH(SQ_DEPTH), .NST(NPE)) u_sq (
    .clk, .rst_n, .flush, .st(st_in), .free_en(sq_free), .head(sq_head),
    .ld_pos(head.sqpos), .ld_addr(ea), .fwd_hit, .fwd_data,
    .head_addr(), .head_data()
  );

  logic  can_issue;
  word_t x, y, res;

  always_comb begin
    // operands
    unique case (u.mode)
      M_AR:    begin x = acc;   y = r_val; end
      M_RA:    begin x = r_val; y = acc;   end
      M_AI:    begin x = acc;   y = u.imm; end
      default: begin x = r_val; y = u.imm; end
    endcase
    unique case (u.mode)
      M_R:     res = r_val;
      M_I:     res = u.imm;
      default: res = alu_op(u.func, x, y);
    endcase
    // effective address: store mode M_RA and load mode M_R use the GPR as base
    if ((u.iclass == C_ST && u.mode == M_RA) || (u.iclass == C_LD && u.mode == M_R))
      ea = r_val + u.imm;
    else
      ea = acc + u.imm;
  end

  assign can_issue  = head_v && !ld_busy && !flush && (!u.reads_gpr || r_rdy);
  assign pop        = can_issue;
  assign busy_issue = can_issue;
  assign stall_opnd = head_v && !ld_busy && u.reads_gpr && !r_rdy;
  assign fwd_used   = can_issue && u.iclass == C_LD && fwd_hit;

  logic ld_done;
  assign ld_done = ld_busy && ld_cnt == 4'(DC_LAT - 1) && !flush;

  word_t ld_value;
  assign ld_value = ld_fwd ? ld_fwd_data : dc_rd_data;

  always_comb begin
    gwr_out  = '0;
    cmpl     = '0;
    st_out   = '0;
    lq_valid = 1'b0;
    lq_pos   = head.lqpos;
    lq_rtag  = head.rtag;
    lq_addr  = ea;
    dc_rd_en   = 1'b0;
    dc_rd_addr = ea;
    if (ld_done) begin
      gwr_out.valid = ld_ent.uop.wkind == W_GLOB;
      gwr_out.tag   = ld_ent.pdst;
      gwr_out.value = ld_value;
      cmpl.valid    = 1'b1;
      cmpl.rtag     = ld_ent.rtag;
      cmpl.value    = ld_value;
    end else if (can_issue) begin
      cmpl.rtag = head.rtag;
      unique case (u.iclass)
        C_ALU: begin
          gwr_out.valid = u.wkind == W_GLOB;
          gwr_out.tag   = head.pdst;
          gwr_out.value = res;
          cmpl.valid    = 1'b1;
          cmpl.value    = res;
        end
        C_LD: begin
          dc_rd_en = 1'b1;
          lq_valid = 1'b1;
        end
        C_ST: begin
          st_out.valid = 1'b1;
          st_out.sqpos = head.sqpos;
          st_out.lqpos = head.lqpos;
          st_out.addr  = ea;
          st_out.data  = (u.mode == M_RA) ? acc : r_val;
          cmpl.valid   = 1'b1;
          cmpl.value   = ea;
          cmpl.value2  = st_out.data;
        end
        C_BR: begin
          cmpl.valid = 1'b1;
          cmpl.taken = br_taken(u.func, acc);
        end
        C_JTW: begin
          cmpl.valid  = 1'b1;
          cmpl.value  = r_val;
          cmpl.value2 = acc;
        end
        C_JMP: begin
          cmpl.valid = 1'b1;
          cmpl.value = r_val;
        end
        default: cmpl.valid = 1'b1;   // push, halt
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      ld_busy <= 1'b0;
      ld_cnt  <= '0;
      ld_fwd  <= 1'b0;
    end else if (flush) begin
      ld_busy <= 1'b0;
    end else if (ld_done) begin
      ld_busy <= 1'b0;
      acc     <= ld_value;
    end else if (ld_busy) begin
      ld_cnt <= ld_cnt + 1'b1;
    end else if (can_issue) begin
      if (u.iclass == C_ALU) acc <= res;
      if (u.iclass == C_LD) begin
        ld_busy <= 1'b1;
        ld_cnt  <= '0;
        ld_fwd  <= fwd_hit;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (can_issue && u.iclass == C_LD) begin
      ld_ent      <= head;
      ld_fwd_data <= fwd_data;
    end
  end
endmodule
