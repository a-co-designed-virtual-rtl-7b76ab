// dual_ras: return address stack holding (SPC, TPC) pairs.
//
// In a code cache the PC after a call is not the translated return address,
// and only the source return address (SPC) is in a register when the return
// executes. A push-dual-RAS instruction therefore pushes both addresses; a
// return pops the pair, fetch follows the TPC and the return, when it
// retires, compares the popped SPC with the SPC in its register to verify the
// prediction.
//
// Two copies of the stack are kept (this design's choice for recovery): a
// speculative one, pushed and popped at fetch, and a committed one, pushed
// and popped at retirement. A pipeline flush copies the committed stack over
// the speculative one. Each is a circular buffer of DEPTH entries; a push to
// a full stack overwrites the oldest entry, a pop of an empty one returns
// whatever the slot holds. Pops and pushes in one cycle on one copy: the pop
// reads the old top, then the push writes (a return immediately followed by
// a call). Top-of-stack outputs are combinational.
module dual_ras
  import ildp_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  // speculative stack (fetch)
  input  logic  s_push,
  input  logic  s_pop,
  input  word_t s_push_spc,
  input  word_t s_push_tpc,
  output word_t s_top_spc,
  output word_t s_top_tpc,
  // committed stack (retire)
  input  logic  c_push,
  input  logic  c_pop,
  input  word_t c_push_spc,
  input  word_t c_push_tpc,
  // recovery
  input  logic  restore
);
  localparam int PW = $clog2(DEPTH);

  word_t s_spc [DEPTH];
  word_t s_tpc [DEPTH];
  word_t c_spc [DEPTH];
  word_t c_tpc [DEPTH];
  logic [PW-1:0] s_tos, c_tos;   // index of the top entry

  assign s_top_spc = s_spc[s_tos];
  assign s_top_tpc = s_tpc[s_tos];

  logic [PW-1:0] s_base, c_base, c_tos_nxt;
  assign s_base    = s_pop ? s_tos - 1'b1 : s_tos;
  assign c_base    = c_pop ? c_tos - 1'b1 : c_tos;
  assign c_tos_nxt = c_push ? c_base + 1'b1 : c_base;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_tos <= '0;
      c_tos <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        s_spc[i] <= '0; s_tpc[i] <= '0;
        c_spc[i] <= '0; c_tpc[i] <= '0;
      end
    end else begin
      c_tos <= c_tos_nxt;
      if (c_push) begin
        c_spc[c_base + 1'b1] <= c_push_spc;
        c_tpc[c_base + 1'b1] <= c_push_tpc;
      end
      if (restore) begin
        s_tos <= c_tos_nxt;
        for (int i = 0; i < DEPTH; i++) begin
          s_spc[i] <= c_spc[i];
          s_tpc[i] <= c_tpc[i];
        end
        if (c_push) begin
          s_spc[c_base + 1'b1] <= c_push_spc;
          s_tpc[c_base + 1'b1] <= c_push_tpc;
        end
      end else begin
        s_tos <= s_push ? s_base + 1'b1 : s_base;
        if (s_push) begin
          s_spc[s_base + 1'b1] <= s_push_spc;
          s_tpc[s_base + 1'b1] <= s_push_tpc;
        end
      end
    end
  end
endmodule
