// ildp_tb_pkg: instruction encoders and a reference interpreter for the ILDP
// core testbenches.
//
// The encoders build instruction words field by field from the format
// layouts. The interpreter executes a program one instruction at a time with
// the architectural meaning of each instruction, written independently of the
// RTL decoder: GPR reads see only values written with write kind "global"
// (the physical view), the architected register file sees both kinds, a
// register-indirect jump goes through a 256-entry direct-mapped JTLT model
// (dispatch address on a miss) and a return uses the 16-entry (SPC, TPC)
// stack when its SPC matches.
package ildp_tb_pkg;

  localparam logic [2:0] ALU = 3'd0, LD = 3'd1, ST = 3'd2, BR = 3'd3,
                         JMP = 3'd4, PUSH = 3'd5, JTW = 3'd6, HALT = 3'd7;
  localparam logic [1:0] WN = 2'd0, WA = 2'd1, WG = 2'd2;
  localparam logic [2:0] MAR = 3'd0, MRA = 3'd1, MAI = 3'd2, MR = 3'd3, MI = 3'd4;
  localparam logic [4:0] FADD = 5'd0, FSUB = 5'd1, FAND = 5'd2, FOR = 5'd3, FXOR = 5'd4,
                         FSLL = 5'd5, FSRL = 5'd6, FSRA = 5'd7, FS8ADD = 5'd8,
                         FCMPEQ = 5'd9, FCMPLT = 5'd10, FCMPULT = 5'd11, FMOVB = 5'd12,
                         FBIC = 5'd13;
  localparam logic [4:0] BEQ = 5'd0, BNE = 5'd1, BLT = 5'd2, BGE = 5'd3, BAL = 5'd4;

  function automatic logic [31:0] e_alu(logic [1:0] wk, logic [2:0] a, logic eos,
                                        logic [2:0] m, logic [7:0] x, logic [4:0] f,
                                        logic [5:0] rd);
    return {1'b0, ALU, wk, a, eos, m, x, f, rd};
  endfunction

  function automatic logic [31:0] e_mem(logic [2:0] cls, logic [1:0] wk, logic [2:0] a,
                                        logic eos, logic [2:0] m, logic [5:0] ra,
                                        logic [6:0] off, logic [5:0] rd);
    return {1'b0, cls, wk, a, eos, m, ra, off, rd};
  endfunction

  function automatic logic [31:0] e_br(logic [2:0] a, logic eos, logic [4:0] c,
                                       logic [13:0] disp);
    return {1'b0, BR, WN, a, eos, 3'd0, disp[13:6], c, disp[5:0]};
  endfunction

  function automatic logic [31:0] e_jmp(logic [4:0] kind, logic [5:0] rs);
    return {1'b0, JMP, WN, 3'd0, 1'b0, 3'd0, 2'b0, rs, kind, 6'd0};
  endfunction

  function automatic logic [31:0] e_push(logic [13:0] disp);
    return {1'b0, PUSH, WN, 3'd0, 1'b0, 3'd0, disp[13:6], 5'd0, disp[5:0]};
  endfunction

  function automatic logic [31:0] e_jtw(logic [2:0] a, logic eos, logic [5:0] rs);
    return {1'b0, JTW, WN, a, eos, 3'd0, 2'b0, rs, 5'd0, 6'd0};
  endfunction

  function automatic logic [31:0] e_halt();
    return {1'b0, HALT, WN, 26'd0};
  endfunction

  function automatic logic [15:0] e_short(logic [4:0] f, logic [2:0] a, logic m,
                                          logic [5:0] rs);
    return {1'b1, f, a, m, rs};
  endfunction

  function automatic logic [63:0] ref_alu(logic [4:0] f, logic [63:0] x, logic [63:0] y);
    case (f)
      FADD:    return x + y;
      FSUB:    return x - y;
      FAND:    return x & y;
      FOR:     return x | y;
      FXOR:    return x ^ y;
      FSLL:    return x << y[5:0];
      FSRL:    return x >> y[5:0];
      FSRA:    return $signed(x) >>> y[5:0];
      FS8ADD:  return x * 8 + y;
      FCMPEQ:  return {63'd0, x == y};
      FCMPLT:  return {63'd0, $signed(x) < $signed(y)};
      FCMPULT: return {63'd0, x < y};
      FMOVB:   return y;
      FBIC:    return x & ~y;
      default: return 64'd0;
    endcase
  endfunction

  // Reference machine state.
  class ref_machine;
    logic [63:0] P [64];
    logic [63:0] R [64];
    logic [63:0] A [8];
    logic [63:0] mem [logic [63:0]];
    logic        jv [256];
    logic [63:0] jspc [256];
    logic [63:0] jtpc [256];
    logic [63:0] rs_spc [16];
    logic [63:0] rs_tpc [16];
    int          tos;
    logic [63:0] pc;
    logic [63:0] dispatch;
    int          steps;
    bit          halted;

    function new(logic [63:0] disp);
      foreach (P[i]) begin P[i] = 0; R[i] = 0; end
      foreach (A[i]) A[i] = 0;
      foreach (jv[i]) jv[i] = 0;
      foreach (rs_spc[i]) begin rs_spc[i] = 0; rs_tpc[i] = 0; end
      tos = 0; pc = 0; dispatch = disp; steps = 0; halted = 0;
    endfunction

    function logic [63:0] rd_mem(logic [63:0] a);
      logic [63:0] k;
      k = {a[63:3], 3'b0};
      return mem.exists(k) ? mem[k] : 64'd0;
    endfunction

    function logic [63:0] jt_target(logic [63:0] spc);
      int i;
      i = spc[9:2];
      return (jv[i] && jspc[i] == spc) ? jtpc[i] : dispatch;
    endfunction

    // Executes one instruction; code is an array of 16-bit parcels.
    function void step(ref logic [15:0] code []);
      logic [15:0] p0;
      logic [31:0] w;
      logic [63:0] rv, av, res, imm, fall, ea;
      logic [5:0]  op;
      logic [2:0]  a, cls, m;
      logic [1:0]  wk;
      logic [5:0]  rs, rd;
      logic [4:0]  f;
      int          ix;
      ix = int'(pc[63:1]);
      p0 = code[ix];
      steps++;
      if (p0[15]) begin
        f  = p0[14:10]; a = p0[9:7]; rs = p0[5:0];
        rv = P[rs];
        A[a] = p0[6] ? ref_alu(f, rv, A[a]) : ref_alu(f, A[a], rv);
        pc = pc + 2;
        return;
      end
      w    = {code[ix], code[ix+1]};
      op   = w[31:26]; cls = op[4:2]; wk = (op[1:0] == 2'd3) ? WN : op[1:0];
      a    = w[25:23]; m = w[21:19]; rd = w[5:0]; f = w[10:6];
      fall = pc + ((cls == PUSH) ? 8 : 4);
      case (cls)
        ALU: begin
          rs  = w[16:11];
          rv  = P[rs];
          imm = {{56{w[18]}}, w[18:11]};
          case (m)
            MAR: res = ref_alu(f, A[a], rv);
            MRA: res = ref_alu(f, rv, A[a]);
            MAI: res = ref_alu(f, A[a], imm);
            MR:  res = rv;
            default: res = imm;
          endcase
          A[a] = res;
          if (wk == WG) P[rd] = res;
          if (wk != WN) R[rd] = res;
          pc = fall;
        end
        LD: begin
          rs  = w[18:13];
          imm = {{57{w[12]}}, w[12:6]} * 8;
          ea  = ((m == MR) ? P[rs] : A[a]) + imm;
          res = rd_mem(ea);
          A[a] = res;
          if (wk == WG) P[rd] = res;
          if (wk != WN) R[rd] = res;
          pc = fall;
        end
        ST: begin
          rs  = w[18:13];
          imm = {{57{w[12]}}, w[12:6]} * 8;
          if (m == MRA) begin ea = P[rs] + imm; mem[{ea[63:3], 3'b0}] = A[a]; end
          else          begin ea = A[a] + imm;  mem[{ea[63:3], 3'b0}] = P[rs]; end
          pc = fall;
        end
        BR: begin
          logic t;
          imm = {{49{w[18]}}, w[18:11], w[5:0], 1'b0};
          case (f)
            BEQ: t = A[a] == 0;
            BNE: t = A[a] != 0;
            BLT: t = A[a][63];
            BGE: t = !A[a][63];
            BAL: t = 1;
            default: t = 0;
          endcase
          pc = t ? pc + imm : fall;
        end
        JMP: begin
          rv = P[w[16:11]];
          if (f == 5'd1) begin
            logic [63:0] s, t;
            s = rs_spc[tos]; t = rs_tpc[tos];
            tos = (tos + 15) % 16;
            pc = (s == rv) ? t : jt_target(rv);
          end else pc = jt_target(rv);
        end
        PUSH: begin
          imm = {{49{w[18]}}, w[18:11], w[5:0], 1'b0};
          tos = (tos + 1) % 16;
          rs_spc[tos] = {32'd0, code[ix+2], code[ix+3]};
          rs_tpc[tos] = pc + imm;
          pc = fall;
        end
        JTW: begin
          rv = P[w[16:11]];
          jv[rv[9:2]]   = 1;
          jspc[rv[9:2]] = rv;
          jtpc[rv[9:2]] = A[a];
          pc = fall;
        end
        default: halted = 1;
      endcase
    endfunction
  endclass

endpackage
