// tb_ildp_decode: self-checking test of the instruction decoder.
//
// Builds random instructions of every class and of the short format from
// random field values with the encoders of the test package, followed by
// random bits, and checks the decoded length, class, write kind, accumulator,
// operand mode, end-of-strand bit, GPR source and destination, function,
// immediate (sign extension and scaling) and the operand-use flags against
// values derived from the chosen fields. The decoder is combinational.
module tb_ildp_decode;
  import ildp_pkg::*;
  import ildp_tb_pkg::*;
  logic [63:0] win;
  uop_t uop;
  int checks = 0, failures = 0;

  ildp_decode dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s win=%h", what, win); end
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [2:0] a, m, cls; logic [1:0] wk; logic eos; logic [7:0] x; logic [4:0] f;
      logic [5:0] rd, ra; logic [6:0] off; logic [13:0] disp; logic [31:0] tail;
      int k;
      a = 3'($urandom); m = 3'($urandom_range(0, 4)); wk = 2'($urandom_range(0, 2)); eos = 1'($urandom);
      x = 8'($urandom); f = 5'($urandom_range(0, 13)); rd = 6'($urandom); ra = 6'($urandom);
      off = 7'($urandom); disp = 14'($urandom); tail = $urandom;
      k = $urandom_range(0, 8);
      case (k)
        0: begin   // operate
          win = {e_alu(wk, a, eos, m, x, f, rd), tail};
          #1;
          chk(uop.len == 2 && uop.iclass == C_ALU && uop.wkind == wkind_e'(wk) && uop.acc == a &&
              uop.mode == opmode_e'(m) && uop.eos == eos && uop.rd == rd && uop.func == f, "alu fields");
          chk(uop.rs == x[5:0] && uop.imm == {{56{x[7]}}, x}, "alu R / Imm");
          chk(uop.reads_acc == (m <= 2) && uop.reads_gpr == (m == 0 || m == 1 || m == 3), "alu operand use");
        end
        1, 2: begin   // load / store
          cls = (k == 1) ? LD : ST;
          m = (k == 1) ? ($urandom_range(0, 1) ? MR : MAR) : ($urandom_range(0, 1) ? MRA : MAR);
          win = {e_mem(cls, wk, a, eos, m, ra, off, rd), tail};
          #1;
          chk(uop.len == 2 && uop.iclass == iclass_e'(cls) && uop.acc == a && uop.eos == eos &&
              uop.rs == ra && uop.mode == opmode_e'(m), "mem fields");
          chk(uop.imm == {{54{off[6]}}, off, 3'b000}, "mem offset scaled by 8");
          chk(uop.wkind == ((k == 1) ? wkind_e'(wk) : W_NONE), "mem write kind");
          if (k == 1) chk(uop.reads_acc == (m != MR) && uop.reads_gpr == (m == MR), "load operand use");
          else        chk(uop.reads_acc && uop.reads_gpr, "store operand use");
        end
        3: begin   // branch
          f = 5'($urandom_range(0, 4));
          win = {e_br(a, eos, f, disp), tail};
          #1;
          chk(uop.iclass == C_BR && uop.func == f && uop.acc == a && uop.wkind == W_NONE &&
              uop.imm == {{49{disp[13]}}, disp, 1'b0}, "branch");
          chk(uop.reads_acc == (f != BAL) && !uop.reads_gpr, "branch operand use");
        end
        4: begin   // jump / return
          win = {e_jmp(5'(k & 1), ra), tail};
          #1;
          chk(uop.iclass == C_JMP && uop.rs == ra && uop.reads_gpr && !uop.reads_acc && uop.len == 2, "jump");
        end
        5: begin   // push-dual-RAS, 64 bits
          win = {e_push(disp), tail};
          #1;
          chk(uop.iclass == C_PUSH && uop.len == 4 && uop.lit == tail &&
              uop.imm == {{49{disp[13]}}, disp, 1'b0} && !uop.reads_gpr && !uop.reads_acc, "push");
        end
        6: begin   // JTLT write
          win = {e_jtw(a, eos, ra), tail};
          #1;
          chk(uop.iclass == C_JTW && uop.acc == a && uop.rs == ra && uop.reads_acc && uop.reads_gpr &&
              uop.wkind == W_NONE, "jtlt write");
        end
        7: begin   // halt
          win = {e_halt(), tail};
          #1;
          chk(uop.iclass == C_HALT && uop.len == 2 && !uop.reads_acc && !uop.reads_gpr, "halt");
        end
        default: begin   // short format
          logic mm;
          mm = 1'($urandom);
          win = {e_short(f, a, mm, ra), 16'($urandom), tail};
          #1;
          chk(uop.len == 1 && uop.iclass == C_ALU && uop.func == f && uop.acc == a && uop.rs == ra &&
              uop.mode == (mm ? M_RA : M_AR) && !uop.eos && uop.wkind == W_NONE &&
              uop.reads_acc && uop.reads_gpr, "short");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
