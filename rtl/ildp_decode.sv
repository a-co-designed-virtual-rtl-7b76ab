// ildp_decode: decoder for one ILDP instruction.
//
// Input is the next 64 bits of the instruction stream, first 16-bit parcel in
// inst[63:48]; below, inst[31:0] means the first 32 bits (win[63:32]). The
// top opcode bit tells the length: a short (16-bit) instruction occupies one
// parcel, most instructions two, and push-dual-RAS four: its second word is
// the 32-bit return SPC literal, so that the instruction carries both the SPC
// and the TPC it pushes.
// The field layout (6-bit Op, 3-bit A, 4-bit Mode with the end-of-strand bit at
// Mode[22], 8-bit Ext/R-or-Imm, 5-bit Func, 6-bit Rd; memory format with 6-bit
// Ra and 7-bit Offset) follows the ISA definition; the opcode and mode values
// are this design's own (see ildp_pkg). A short instruction is
// A <- A func R (M=0) or A <- R func A (M=1); it writes no GPR and never ends a
// strand. Purely combinational.
module ildp_decode
  import ildp_pkg::*;
(
  input  logic [63:0] win,
  output uop_t        uop
);
  logic [31:0] inst;
  logic [5:0]  op;
  logic [15:0] sh;

  assign inst = win[63:32];
  assign op   = inst[31:26];
  assign sh = inst[31:16];

  always_comb begin
    uop        = '0;
    uop.valid  = 1'b1;
    uop.acc    = inst[25:23];
    if (op[5]) begin
      // short format
      uop.len       = 3'd1;
      uop.iclass    = C_ALU;
      uop.wkind     = W_NONE;
      uop.func      = op[4:0];
      uop.mode      = sh[6] ? M_RA : M_AR;
      uop.eos       = 1'b0;
      uop.rs        = sh[5:0];
      uop.rd        = '0;
      uop.reads_acc = 1'b1;
      uop.reads_gpr = 1'b1;
    end else begin
      uop.len    = (op[4:2] == C_PUSH) ? 3'd4 : 3'd2;
      uop.iclass = iclass_e'(op[4:2]);
      uop.wkind  = (op[1:0] == 2'd3) ? W_NONE : wkind_e'(op[1:0]);
      uop.eos    = inst[22];
      uop.mode   = opmode_e'(inst[21:19]);
      uop.rd     = inst[5:0];
      uop.func   = inst[10:6];
      unique case (iclass_e'(op[4:2]))
        C_ALU: begin
          uop.rs        = inst[16:11];
          uop.imm       = word_t'($signed(inst[18:11]));
          uop.reads_acc = (uop.mode == M_AR) || (uop.mode == M_RA) || (uop.mode == M_AI);
          uop.reads_gpr = (uop.mode == M_AR) || (uop.mode == M_RA) || (uop.mode == M_R);
        end
        C_LD: begin
          // mode M_AR: base = A ; mode M_R: base = R[Ra]
          uop.rs        = inst[18:13];
          uop.func      = '0;
          uop.imm       = word_t'($signed(inst[12:6])) <<< 3;
          uop.reads_acc = (uop.mode != M_R);
          uop.reads_gpr = (uop.mode == M_R);
        end
        C_ST: begin
          // mode M_AR: address A + off, data R[Ra] ; mode M_RA: address R[Ra] + off, data A
          uop.rs        = inst[18:13];
          uop.func      = '0;
          uop.wkind     = W_NONE;
          uop.imm       = word_t'($signed(inst[12:6])) <<< 3;
          uop.reads_acc = 1'b1;
          uop.reads_gpr = 1'b1;
        end
        C_BR: begin
          uop.wkind     = W_NONE;
          uop.imm       = word_t'($signed({inst[18:11], inst[5:0]})) <<< 1;
          uop.reads_acc = (inst[10:6] != B_AL);
          uop.reads_gpr = 1'b0;
        end
        C_JMP: begin
          uop.wkind     = W_NONE;
          uop.rs        = inst[16:11];
          uop.reads_acc = 1'b0;
          uop.reads_gpr = 1'b1;
        end
        C_PUSH: begin
          uop.wkind     = W_NONE;
          uop.imm       = word_t'($signed({inst[18:11], inst[5:0]})) <<< 1;
          uop.lit       = win[31:0];
          uop.reads_acc = 1'b0;
          uop.reads_gpr = 1'b0;
        end
        C_JTW: begin
          uop.wkind     = W_NONE;
          uop.rs        = inst[16:11];
          uop.reads_acc = 1'b1;
          uop.reads_gpr = 1'b1;
        end
        default: begin  // C_HALT
          uop.wkind     = W_NONE;
          uop.reads_acc = 1'b0;
          uop.reads_gpr = 1'b0;
        end
      endcase
    end
  end
endmodule
