// tb_fetch: self-checking test of the fetch unit.
//
// A random instruction stream of every length and class is laid out in a
// code array; branch, push and BTB/RAS targets point at instruction starts.
// The testbench answers the predictor ports combinationally with fixed
// functions of the lookup address (taken = bit 2 xor bit 5 of the branch PC,
// BTB hit = bit 4 of the jump PC, target from a table) and a fixed RAS top.
// A reference walks the same stream: a group holds up to W instructions that
// fit in the 32-byte window and ends after the first control transfer; the
// next TPC is the predicted one. Checked on each group taken by dispatch:
// number of slots, every slot's PC, class and predicted next PC, and that
// each speculative predictor update fires once per group that needs it.
// Dispatch accepts at random and a redirect arrives now and then.
module tb_fetch;
  import ildp_pkg::*;
  import ildp_tb_pkg::*;
  localparam int W = 4, NP = 2048;   // code parcels
  logic clk = 0, rst_n = 0, flush, accept;
  word_t redirect, imem_addr, gs_pc, btb_pc, btb_tgt, ras_push_spc, ras_push_tpc, ras_top_spc, ras_top_tpc;
  logic [255:0] imem_data;
  logic [W-1:0] out_valid;
  fslot_t out_slot [W];
  logic gs_taken, gs_shift, btb_hit, ras_push, ras_pop;
  logic [11:0] gs_hist;
  int checks = 0, failures = 0, groups = 0;

  fetch #(.W(W), .RESET_TPC('0)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] code [NP + 16];
  int          starts[$];
  int          ilen [NP];      // length in parcels of the instruction starting at a parcel
  int          icls [NP];
  int          ifn  [NP];
  int          itgt [NP];      // branch / push target parcel
  int          tgts [64];      // BTB targets by jump PC bits, RAS top at entry 0

  always_comb
    for (int k = 0; k < 16; k++)
      imem_data[255 - 16*k -: 16] = (int'(imem_addr[63:1]) + k < NP + 16) ? code[int'(imem_addr[63:1]) + k] : 16'h0;

  assign gs_taken    = gs_pc[2] ^ gs_pc[5];
  assign gs_hist     = 12'h5a5;
  assign btb_hit     = btb_pc[4];
  assign btb_tgt     = word_t'(2 * tgts[btb_pc[6:1]]);
  assign ras_top_spc = 64'h1234;
  assign ras_top_tpc = word_t'(2 * tgts[0]);

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int p;
    // lay out the stream
    p = 0;
    for (int i = 0; i < NP + 16; i++) code[i] = '0;
    while (p < NP - 8) begin
      int k; logic [31:0] w;
      k = $urandom_range(0, 9);
      starts.push_back(p);
      icls[p] = C_ALU; ifn[p] = 0; itgt[p] = 0;
      case (k)
        0, 1: begin ilen[p] = 1; code[p] = e_short(5'($urandom_range(0, 13)), 3'($urandom), 1'($urandom), 6'($urandom)); end
        2, 3: begin ilen[p] = 2; w = e_alu(WG, 3'($urandom), 1'($urandom), MAR, 8'($urandom), FADD, 6'($urandom)); code[p] = w[31:16]; code[p+1] = w[15:0]; end
        4:    begin ilen[p] = 2; icls[p] = C_LD; w = e_mem(LD, WG, 3'd1, 1'b0, MAR, 6'd0, 7'd3, 6'd2); code[p] = w[31:16]; code[p+1] = w[15:0]; end
        5, 6: begin ilen[p] = 2; icls[p] = C_BR; ifn[p] = (k == 5) ? BNE : BAL; end
        7:    begin ilen[p] = 2; icls[p] = C_JMP; ifn[p] = $urandom_range(0, 1); w = e_jmp(5'(ifn[p]), 6'd9); code[p] = w[31:16]; code[p+1] = w[15:0]; end
        8:    begin ilen[p] = 4; icls[p] = C_PUSH; end
        default: begin ilen[p] = 2; w = e_alu(WN, 3'd2, 1'b1, MI, 8'd5, FADD, 6'd0); code[p] = w[31:16]; code[p+1] = w[15:0]; end
      endcase
      p += ilen[p];
    end
    // targets of branches and pushes
    foreach (starts[j]) begin
      int s; logic [31:0] w; logic [13:0] d;
      s = starts[j];
      if (icls[s] == C_BR || icls[s] == C_PUSH) begin
        itgt[s] = starts[$urandom_range(0, starts.size() - 1)];
        d = 14'(itgt[s] - s);
        w = (icls[s] == C_BR) ? e_br(3'd1, 1'b0, 5'(ifn[s]), d) : e_push(d);
        code[s] = w[31:16]; code[s+1] = w[15:0];
        if (icls[s] == C_PUSH) begin code[s+2] = 16'h0000; code[s+3] = 16'(s); end
      end
    end
    for (int j = 0; j < 64; j++) tgts[j] = starts[$urandom_range(0, starts.size() - 1)];
    // a halt at the end of the stream and at its last parcels
    begin logic [31:0] w; w = e_halt(); starts.push_back(p); ilen[p] = 2; icls[p] = C_HALT; ifn[p] = 0; code[p] = w[31:16]; code[p+1] = w[15:0]; end
  end

  initial begin
    int rpc;   // reference fetch PC, in parcels
    flush = 0; accept = 0; redirect = 0;
    rpc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      accept = $urandom_range(0, 3) != 0;
      flush  = $urandom_range(0, 63) == 0;
      redirect = word_t'(2 * starts[$urandom_range(0, starts.size() - 2)]);
      #1;
      if (out_valid != '0 && accept && !flush) begin
        // reference group from the previous fetch PC
        int off, i, npc; bit ended;
        off = 0; i = 0; ended = 0; npc = rpc;
        groups++;
        while (!ended && i < W && off + ilen[rpc + off] <= 16) begin
          int ip, fall, pn;
          ip = rpc + off; fall = ip + ilen[ip]; pn = fall;
          case (icls[ip])
            C_BR:   begin ended = 1; pn = (ifn[ip] == BAL || (((2*ip) >> 2) & 1) != (((2*ip) >> 5) & 1)) ? itgt[ip] : fall; end
            C_JMP:  begin ended = 1; pn = (ifn[ip] == 1) ? tgts[0] : ((((2*ip) >> 4) & 1) ? tgts[ip % 64] : fall); end
            C_PUSH: begin ended = 1; end
            C_HALT: begin ended = 1; end
            default: ;
          endcase
          chk(out_valid[i] && out_slot[i].pc == word_t'(2*ip) && out_slot[i].uop.iclass == iclass_e'(icls[ip]) &&
              out_slot[i].pred_npc == word_t'(2*pn),
              $sformatf("n=%0d slot %0d pc=%h want %h cls=%0d want %0d npc=%h want %h", n, i, out_slot[i].pc, 2*ip,
                        out_slot[i].uop.iclass, icls[ip], out_slot[i].pred_npc, 2*pn));
          off += ilen[ip]; i++; npc = pn;
        end
        chk(out_valid == W'((1 << i) - 1), $sformatf("n=%0d valid=%b want %0d slots", n, out_valid, i));
        rpc = npc;
      end
      if (flush) rpc = int'(redirect[63:1]);
      @(posedge clk);
      #1 {flush, accept} = '0;
    end
    if (groups < 100) begin failures++; $display("FAIL only %0d groups", groups); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
