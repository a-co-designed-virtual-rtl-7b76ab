// tb_ildp_top: end-to-end test of the ILDP core at its default size.
//
// Assembles a program of translated code, runs it on the core until the halt
// instruction retires, and compares all 64 architected registers and the
// retired instruction count with the reference interpreter. The program makes
// every mechanism of the core happen: strands starting and ending, values
// crossing the global network, short-format instructions, architected-only
// GPR writes, a counted loop with branch mispredictions, a dependent pointer
// chase, a long strand that fills its FIFO and stalls dispatch, store-to-load
// forwarding, a memory ordering violation and replay, JTLT writes, a
// register-indirect jump that hits the JTLT (first time a BTB miss, then BTB
// hits), one that misses and enters the dispatch code, and a call whose
// return is predicted by the dual RAS. Event counters are checked to have
// seen each of them.
`timescale 1ns/1ps
module tb_ildp_top;
  import ildp_pkg::*;
  import ildp_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  word_t        imem_addr;
  logic [255:0] imem_data;
  logic         dinit_en;
  word_t        dinit_addr, dinit_data;
  logic         halted;
  word_t        arch_regs [NGPR];
  perf_t        perf;

  ildp_top dut (
    .clk, .rst_n, .imem_addr, .imem_data, .dinit_en, .dinit_addr, .dinit_data,
    .halted, .arch_regs, .perf
  );

  // ---------------------------------------------------------------- code memory
  localparam int NPARCEL = 4096;
  logic [15:0] code [];
  int          pcp;          // current parcel index

  always_comb begin
    int b;
    b = int'(imem_addr[12:1]);
    for (int k = 0; k < 16; k++)
      imem_data[255 - 16*k -: 16] = (b + k < NPARCEL) ? code[b + k] : 16'h0;
  end

  function automatic void i32(logic [31:0] w);
    code[pcp] = w[31:16]; code[pcp+1] = w[15:0]; pcp += 2;
  endfunction
  function automatic void i16(logic [15:0] h);
    code[pcp] = h; pcp += 1;
  endfunction
  function automatic void org(int byte_addr);
    pcp = byte_addr / 2;
  endfunction
  function automatic logic [13:0] rel(int target_byte);
    return 14'((target_byte / 2) - pcp);
  endfunction

  // labels (byte addresses), found by the first pass
  int L_MAIN = 'h400, L_JT = 'h700, L_DISP = 'h100;
  int L1, JLOOP, CALLT, RETP, FUNC;

  localparam int B0 = 16, B1 = 18;   // base registers: 0x1000 array, 0x2000 pointer chain

  function automatic void assemble();
    org(0);
    i32(e_br(0, 0, BAL, rel(L_MAIN)));
    // ---- dispatch code (entered on a JTLT miss)
    org(L_DISP);
    i32(e_alu(WG, 4, 1, MI, 8'd99, FADD, 6'd9));
    i32(e_br(0, 0, BAL, rel(CALLT)));
    // ---- main
    org(L_MAIN);
    i32(e_alu(WN, 0, 0, MI, 8'd1, FADD, 0));
    i32(e_alu(WG, 0, 1, MAI, 8'd12, FSLL, B0));           // R16 = 0x1000
    i32(e_alu(WN, 1, 0, MI, 8'd1, FADD, 0));
    i32(e_alu(WG, 1, 1, MAI, 8'd13, FSLL, B1));           // R18 = 0x2000
    i32(e_alu(WG, 2, 1, MI, 8'd32, FADD, 17));            // R17 = 32
    i32(e_alu(WG, 3, 1, MI, 8'd0, FADD, 1));              // R1 = 0
    // loop: R1 += mem[R16]; R16 += 8; R17 -= 1
    L1 = pcp * 2;
    i32(e_mem(LD, WN, 0, 0, MR, B0, 7'd0, 0));
    i16(e_short(FADD, 0, 1'b0, 6'd1));                    // A0 = A0 + R1
    i32(e_alu(WG, 0, 1, MAI, 8'd0, FADD, 1));             // R1 = A0
    i32(e_alu(WN, 1, 0, MR, 8'(B0), FADD, 0));
    i32(e_alu(WG, 1, 1, MAI, 8'd8, FADD, B0));
    i32(e_alu(WN, 2, 0, MR, 8'd17, FADD, 0));
    i32(e_alu(WG, 2, 0, MAI, 8'd1, FSUB, 17));
    i32(e_br(2, 1, BNE, rel(L1)));
    // arch-only write and a few functions
    i32(e_alu(WN, 3, 0, MR, 8'd1, FADD, 0));
    i32(e_alu(WA, 3, 0, MAI, 8'd2, FSRL, 3));             // R3 (architected only)
    i32(e_alu(WG, 3, 0, MAR, 8'(B0), FXOR, 4));           // R4 = A3 ^ R16
    i16(e_short(FS8ADD, 3, 1'b1, 6'd1));                  // A3 = 8*R1 + A3
    i32(e_alu(WG, 3, 1, MAI, 8'hF0, FBIC, 13));           // R13
    // pointer chase (slow strand)
    i32(e_mem(LD, WN, 4, 0, MR, B1, 7'd0, 0));
    for (int k = 0; k < 4; k++) i32(e_mem(LD, WN, 4, 0, MAR, 0, 7'd0, 0));
    i32(e_mem(LD, WG, 4, 1, MAR, 0, 7'd0, 5));            // R5 = end of chain contents
    // store then load of the same word (forwarded while the store waits to retire)
    i32(e_alu(WN, 6, 0, MI, 8'd42, FADD, 0));
    i32(e_mem(ST, WN, 6, 0, MRA, B1, 7'd20, 0));          // mem[R18+160] = 42
    i32(e_mem(LD, WG, 6, 1, MR, B1, 7'd20, 7));           // R7
    // long strand waiting on R5: fills its FIFO
    i32(e_alu(WN, 5, 0, MR, 8'd5, FADD, 0));
    for (int k = 0; k < 22; k++) i32(e_alu(WN, 5, 0, MAI, 8'(k), FADD, 0));
    i32(e_alu(WG, 5, 1, MAI, 8'd3, FXOR, 6));             // R6
    // ordering violation: store address known late, younger load to it runs early
    i32(e_mem(LD, WN, 0, 0, MR, B1, 7'd0, 0));            // A0 = 0x2008
    i32(e_mem(ST, WN, 0, 0, MAR, 1, 7'd0, 0));            // mem[A0] = R1
    i32(e_mem(LD, WG, 1, 1, MR, B1, 7'd1, 8));            // R8 = mem[0x2008]
    i32(e_alu(WN, 0, 1, MAI, 8'd0, FADD, 0));             // ends the store's strand
    // JTLT entry SPC 0x4000 -> L_JT, then a jump loop through it
    i32(e_alu(WN, 2, 0, MI, 8'd1, FADD, 0));
    i32(e_alu(WG, 2, 1, MAI, 8'd14, FSLL, 20));           // R20 = 0x4000
    i32(e_alu(WN, 3, 0, MI, 8'(L_JT >> 4), FADD, 0));
    i32(e_alu(WN, 3, 0, MAI, 8'd4, FSLL, 0));
    i32(e_jtw(3, 1, 20));
    i32(e_alu(WG, 7, 1, MI, 8'd3, FADD, 21));             // R21 = 3
    JLOOP = pcp * 2;
    i32(e_jmp(5'd0, 20));
    org(L_JT);
    i32(e_alu(WN, 7, 0, MR, 8'd21, FADD, 0));
    i32(e_alu(WG, 7, 0, MAI, 8'd1, FSUB, 21));
    i32(e_br(7, 1, BNE, rel(JLOOP)));
    // jump to an SPC with no JTLT entry: goes to the dispatch code
    i32(e_alu(WN, 2, 0, MI, 8'd3, FADD, 0));
    i32(e_alu(WG, 2, 1, MAI, 8'd13, FSLL, 22));           // R22 = 0x6000
    i32(e_jmp(5'd0, 22));
    // call / return through the dual RAS
    CALLT = pcp * 2;
    i32(e_alu(WN, 5, 0, MI, 8'd5, FADD, 0));
    i32(e_alu(WG, 5, 1, MAI, 8'd12, FSLL, 26));           // R26 = 0x5000
    begin
      logic [31:0] w;
      w = e_push(rel(RETP));
      i32(w);
      i32(32'h0000_5000);
    end
    i32(e_br(0, 0, BAL, rel(FUNC)));
    RETP = pcp * 2;
    i32(e_alu(WN, 6, 0, MR, 8'd9, FADD, 0));
    i32(e_alu(WG, 6, 1, MAI, 8'd1, FADD, 10));            // R10 = R9 + 1
    i32(e_mem(LD, WG, 0, 1, MR, B1, 7'd1, 11));           // R11 = mem[0x2008]
    i32(e_mem(LD, WG, 1, 1, MR, B1, 7'd20, 14));          // R14 = mem[0x20a0]
    i32(e_halt());
    FUNC = pcp * 2;
    i32(e_alu(WG, 7, 1, MI, 8'd7, FADD, 12));             // R12 = 7
    i32(e_jmp(5'd1, 26));                                 // return
  endfunction

  // ---------------------------------------------------------------- data image
  function automatic word_t data_word(int k);   // words 0..31 at 0x1000, chain at 0x2000
    if (k < 32) return word_t'(k * 3 + 7);
    return word_t'('h2000 + 8 * (k - 32 + 1));
  endfunction

  int checks = 0, failures = 0;
  ref_machine rm;
  int cyc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code = new[NPARCEL];
    foreach (code[i]) code[i] = 16'h0;
    assemble();                 // first pass fixes the labels
    foreach (code[i]) code[i] = 16'h0;
    assemble();

    rm = new(64'h100);
    for (int k = 0; k < 48; k++) begin
      word_t a;
      a = (k < 32) ? word_t'('h1000 + 8 * k) : word_t'('h2000 + 8 * (k - 32));
      rm.mem[a] = data_word(k);
    end
    while (!rm.halted && rm.steps < 100000) rm.step(code);

    dinit_en = 1'b0; dinit_addr = '0; dinit_data = '0;
    repeat (3) @(posedge clk);
    for (int k = 0; k < 48; k++) begin
      dinit_en   <= 1'b1;
      dinit_addr <= (k < 32) ? word_t'('h1000 + 8 * k) : word_t'('h2000 + 8 * (k - 32));
      dinit_data <= data_word(k);
      @(posedge clk);
    end
    dinit_en <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    while (!halted) begin
      @(posedge clk);
      cyc++;
    end
    repeat (2) @(posedge clk);

    check(rm.halted, "reference reached halt");
    for (int g = 0; g < NGPR; g++)
      check(arch_regs[g] === rm.R[g],
            $sformatf("R%0d = %h, expected %h", g, arch_regs[g], rm.R[g]));
    check(int'(perf.retired) == rm.steps,
          $sformatf("retired %0d, expected %0d", perf.retired, rm.steps));
    check(perf.jmp_misp == 2, $sformatf("jump mispredictions %0d, expected 2", perf.jmp_misp));
    check(perf.strands > 0,      "strands started");
    check(perf.strand_ends > 0,  "strands ended");
    check(perf.br_misp > 0,      "branch misprediction seen");
    check(perf.replays > 0,      "memory ordering replay seen");
    check(perf.jtlt_hits > 0,    "JTLT hit seen");
    check(perf.jtlt_misses > 0,  "JTLT miss seen");
    check(perf.ras_hits > 0,     "dual RAS return seen");
    check(perf.fwd_loads > 0,    "store-to-load forwarding seen");
    check(perf.opnd_stalls > 0,  "operand wait seen");
    check(perf.disp_stalls > 0,  "dispatch stall seen");
    check(perf.remote_uses > 0,  "global network transfer seen");
    $display("cycles=%0d retired=%0d IPC=%0.2f br_misp=%0d jmp_misp=%0d replays=%0d jtlt_hit=%0d jtlt_miss=%0d ras_hit=%0d strands=%0d ends=%0d fwd=%0d opnd_stalls=%0d disp_stalls=%0d remote=%0d",
             cyc, perf.retired, real'(perf.retired) / real'(cyc), perf.br_misp, perf.jmp_misp,
             perf.replays, perf.jtlt_hits, perf.jtlt_misses, perf.ras_hits, perf.strands,
             perf.strand_ends, perf.fwd_loads, perf.opnd_stalls, perf.disp_stalls, perf.remote_uses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
