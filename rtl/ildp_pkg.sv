// ildp_pkg: types and constants shared by the ILDP core.
//
// The ILDP instruction set is accumulator oriented. A chain of dependent
// instructions (a strand) passes its temporary values through one of eight
// accumulators; values that live long or are shared between strands go to the
// 64 general-purpose registers (GPRs). Three formats exist:
//   short    16 bits : Op[15:10] A[9:7] M[6] Rd[5:0]
//   operate  32 bits : Op[31:26] A[25:23] Mode[22:19] ExtR/Imm[18:11] Func[10:6] Rd[5:0]
//   memory   32 bits : Op[31:26] A[25:23] Mode[22:19] Ra[18:13] Offset[12:6] Rd[5:0]
// The field widths and Mode[22] as the end-of-strand bit follow the ISA
// definition. The opcode values, the meaning of the other Mode bits, the ALU
// function codes and the control-transfer instructions below are this
// design's own encoding, since the ISA definition gives only the fields.
//
// Op encoding (this design's choice):
//   Op[5]   = 1 : short format; Op[4:0] is the ALU function.
//   Op[5]   = 0 : 32-bit format; Op[4:2] is the class, Op[1:0] the GPR write kind
//                 (0 none, 1 architected register file only, 2 physical and architected).
// Mode[2:0] (= Mode[21:19]) selects the operands:
//   0 A op R, 1 R op A, 2 A op Imm, 3 R (strand start, copy), 4 Imm (strand start).
package ildp_pkg;

  localparam int XLEN   = 64;   // Alpha V-ISA word
  localparam int NGPR   = 64;   // 6-bit Rd field
  localparam int NACC   = 8;    // 3-bit A field

  typedef logic [XLEN-1:0] word_t;
  typedef logic [5:0]      gpr_t;
  typedef logic [2:0]      acc_t;

  // Instruction classes (Op[4:2] of a 32-bit instruction).
  typedef enum logic [2:0] {
    C_ALU  = 3'd0,   // operate format
    C_LD   = 3'd1,   // memory format, A <- mem[base + 8*off]
    C_ST   = 3'd2,   // memory format, mem[base + 8*off] <- data
    C_BR   = 3'd3,   // operate format, conditional branch on A, 14-bit parcel displacement
    C_JMP  = 3'd4,   // operate format, register-indirect jump through the JTLT or dual RAS
    C_PUSH = 3'd5,   // 64 bits, push-dual-RAS: TPC = PC + 2*disp14, SPC = 32-bit literal
    C_JTW  = 3'd6,   // operate format, JTLT write: entry SPC = R, TPC = A
    C_HALT = 3'd7
  } iclass_e;

  // GPR write kind (Op[1:0]).
  typedef enum logic [1:0] {
    W_NONE = 2'd0,
    W_ARCH = 2'd1,   // value needed only for precise state: architected RF only
    W_GLOB = 2'd2    // value used by other strands: physical and architected RF
  } wkind_e;

  // Operand modes (Mode[2:0]).
  typedef enum logic [2:0] {
    M_AR  = 3'd0,
    M_RA  = 3'd1,
    M_AI  = 3'd2,
    M_R   = 3'd3,
    M_I   = 3'd4
  } opmode_e;

  // ALU functions (Func field, or Op[4:0] of a short instruction).
  typedef enum logic [4:0] {
    F_ADD   = 5'd0,
    F_SUB   = 5'd1,
    F_AND   = 5'd2,
    F_OR    = 5'd3,
    F_XOR   = 5'd4,
    F_SLL   = 5'd5,
    F_SRL   = 5'd6,
    F_SRA   = 5'd7,
    F_S8ADD = 5'd8,   // 8*x + y
    F_CMPEQ = 5'd9,
    F_CMPLT = 5'd10,
    F_CMPULT= 5'd11,
    F_MOVB  = 5'd12,  // y
    F_BIC   = 5'd13   // x & ~y
  } func_e;

  // Branch conditions (Func field of C_BR), tested on the accumulator.
  typedef enum logic [4:0] {
    B_EQ  = 5'd0,
    B_NE  = 5'd1,
    B_LT  = 5'd2,
    B_GE  = 5'd3,
    B_AL  = 5'd4
  } bcond_e;

  // Jump kinds (Func field of C_JMP).
  localparam logic [4:0] J_JUMP = 5'd0;  // look the SPC up in the JTLT
  localparam logic [4:0] J_RET  = 5'd1;  // predicted by the dual RAS

  // Decoded instruction.
  typedef struct packed {
    logic    valid;
    logic [2:0] len;     // length in 16-bit parcels: 1, 2 or 4
    iclass_e iclass;
    wkind_e  wkind;
    opmode_e mode;
    logic    eos;        // end of strand
    logic    reads_acc;  // continues the strand of acc
    logic    reads_gpr;
    acc_t    acc;
    gpr_t    rs;         // GPR source (ExtR field or Ra)
    gpr_t    rd;
    logic [4:0] func;
    word_t   imm;        // sign-extended immediate / byte offset / byte displacement
    logic [31:0] lit;    // push-dual-RAS: return SPC
  } uop_t;

  // Widths of the core's internal tags. They bound the sizes the core can be
  // built with: up to 256 physical registers and ROB entries, and up to 128
  // store or load queue entries (index plus one wrap bit).
  typedef logic [7:0] ptag_t;   // physical register
  typedef logic [7:0] rtag_t;   // reorder buffer entry
  typedef logic [7:0] qidx_t;   // store / load queue position, with wrap bit

  // Instruction as it leaves fetch.
  typedef struct packed {
    uop_t            uop;
    word_t           pc;
    word_t           pred_npc;   // next TPC that fetch followed
    logic [11:0]     ghist;      // gshare history used for a conditional branch
    word_t           ras_spc;    // SPC popped for a return
  } fslot_t;

  // Instruction as it enters a processing element's FIFO.
  typedef struct packed {
    uop_t  uop;
    word_t pc;
    rtag_t rtag;
    ptag_t psrc;
    ptag_t pdst;
    qidx_t sqpos;   // store queue tail at dispatch (own slot for a store)
    qidx_t lqpos;   // load queue tail at dispatch (own slot for a load)
  } disp_t;

  // Global register write (global communication network).
  typedef struct packed {
    logic  valid;
    ptag_t tag;
    word_t value;
  } gwr_t;

  // Completion report to the reorder buffer.
  typedef struct packed {
    logic  valid;
    rtag_t rtag;
    word_t value;    // GPR result, jump SPC, JTLT-write SPC, store address
    word_t value2;   // JTLT-write TPC, store data
    logic  taken;    // branch outcome
  } cmpl_t;

  // Store address and data broadcast (memory ordering network).
  typedef struct packed {
    logic  valid;
    qidx_t sqpos;
    qidx_t lqpos;   // loads at or after this position are younger
    word_t addr;
    word_t data;
  } stbc_t;

  // Event counters of the core.
  typedef struct packed {
    logic [31:0] cycles;
    logic [31:0] retired;
    logic [31:0] br_misp;        // branch mispredictions
    logic [31:0] jmp_misp;       // jump / return mispredictions
    logic [31:0] replays;        // loads squashed by the memory ordering check
    logic [31:0] jtlt_hits;
    logic [31:0] jtlt_misses;
    logic [31:0] ras_hits;       // returns verified against the dual RAS
    logic [31:0] strands;        // strands started
    logic [31:0] strand_ends;
    logic [31:0] opnd_stalls;    // PE-cycles a FIFO head waited for a GPR
    logic [31:0] disp_stalls;    // cycles a fetched group could not dispatch
    logic [31:0] fwd_loads;      // loads served by store-to-load forwarding
    logic [31:0] remote_uses;    // PE-cycles in which a global value arrived from another PE
  } perf_t;

  function automatic word_t alu_op(logic [4:0] f, word_t x, word_t y);
    unique case (f)
      F_ADD:    return x + y;
      F_SUB:    return x - y;
      F_AND:    return x & y;
      F_OR:     return x | y;
      F_XOR:    return x ^ y;
      F_SLL:    return x << y[5:0];
      F_SRL:    return x >> y[5:0];
      F_SRA:    return word_t'($signed(x) >>> y[5:0]);
      F_S8ADD:  return (x << 3) + y;
      F_CMPEQ:  return word_t'(x == y);
      F_CMPLT:  return word_t'($signed(x) < $signed(y));
      F_CMPULT: return word_t'(x < y);
      F_MOVB:   return y;
      F_BIC:    return x & ~y;
      default:  return '0;
    endcase
  endfunction

  function automatic logic br_taken(logic [4:0] c, word_t a);
    unique case (c)
      B_EQ:    return a == '0;
      B_NE:    return a != '0;
      B_LT:    return a[XLEN-1];
      B_GE:    return !a[XLEN-1];
      B_AL:    return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

endpackage
