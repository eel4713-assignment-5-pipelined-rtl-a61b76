// mips_asm_pkg: test-bench helpers for the pipelined MIPS core.
//
// Instruction encoders (one function per instruction of the supported set,
// producing the MIPS-I machine word) and mips_iss, a plain instruction-by-
// instruction reference model of the same instruction set without any
// pipeline: no forwarding, no stalls, no flushes. A test runs the same program
// on both and compares registers and data memory. The model follows the
// architectural rules the core implements: no delay slots, jal links PC+4,
// little-endian byte lanes, lbu/lhu zero-extend, andi/ori zero-extend their
// immediate, data addresses wrap within the data memory.
package mips_asm_pkg;

  function automatic logic [31:0] enc_r(input logic [5:0] fn, input int rd, input int rs,
                                        input int rt, input int sh = 0);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] enc_i(input logic [5:0] op, input int rt, input int rs,
                                        input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] ADD (int d, int s, int t); return enc_r(6'h20, d, s, t); endfunction
  function automatic logic [31:0] ADDU(int d, int s, int t); return enc_r(6'h21, d, s, t); endfunction
  function automatic logic [31:0] SUB (int d, int s, int t); return enc_r(6'h22, d, s, t); endfunction
  function automatic logic [31:0] SUBU(int d, int s, int t); return enc_r(6'h23, d, s, t); endfunction
  function automatic logic [31:0] AND (int d, int s, int t); return enc_r(6'h24, d, s, t); endfunction
  function automatic logic [31:0] OR  (int d, int s, int t); return enc_r(6'h25, d, s, t); endfunction
  function automatic logic [31:0] NOR (int d, int s, int t); return enc_r(6'h27, d, s, t); endfunction
  function automatic logic [31:0] SLT (int d, int s, int t); return enc_r(6'h2A, d, s, t); endfunction
  function automatic logic [31:0] SLTU(int d, int s, int t); return enc_r(6'h2B, d, s, t); endfunction
  function automatic logic [31:0] SLL (int d, int t, int sh); return enc_r(6'h00, d, 0, t, sh); endfunction
  function automatic logic [31:0] SRL (int d, int t, int sh); return enc_r(6'h02, d, 0, t, sh); endfunction
  function automatic logic [31:0] JR  (int s); return enc_r(6'h08, 0, s, 0); endfunction
  function automatic logic [31:0] ADDI (int t, int s, int imm); return enc_i(6'h08, t, s, imm); endfunction
  function automatic logic [31:0] SLTI (int t, int s, int imm); return enc_i(6'h0A, t, s, imm); endfunction
  function automatic logic [31:0] SLTIU(int t, int s, int imm); return enc_i(6'h0B, t, s, imm); endfunction
  function automatic logic [31:0] ANDI (int t, int s, int imm); return enc_i(6'h0C, t, s, imm); endfunction
  function automatic logic [31:0] ORI  (int t, int s, int imm); return enc_i(6'h0D, t, s, imm); endfunction
  function automatic logic [31:0] LUI  (int t, int imm);        return enc_i(6'h0F, t, 0, imm); endfunction
  function automatic logic [31:0] LW   (int t, int off, int s); return enc_i(6'h23, t, s, off); endfunction
  function automatic logic [31:0] LHU  (int t, int off, int s); return enc_i(6'h25, t, s, off); endfunction
  function automatic logic [31:0] LBU  (int t, int off, int s); return enc_i(6'h24, t, s, off); endfunction
  function automatic logic [31:0] SW   (int t, int off, int s); return enc_i(6'h2B, t, s, off); endfunction
  function automatic logic [31:0] SH   (int t, int off, int s); return enc_i(6'h29, t, s, off); endfunction
  function automatic logic [31:0] SB   (int t, int off, int s); return enc_i(6'h28, t, s, off); endfunction
  // branch offset in instructions, relative to the next instruction
  function automatic logic [31:0] BEQ  (int s, int t, int off); return enc_i(6'h04, t, s, off); endfunction
  function automatic logic [31:0] BNE  (int s, int t, int off); return enc_i(6'h05, t, s, off); endfunction
  // absolute byte address of the target
  function automatic logic [31:0] J    (int addr); return {6'h02, 26'(addr >> 2)}; endfunction
  function automatic logic [31:0] JAL  (int addr); return {6'h03, 26'(addr >> 2)}; endfunction

  // Reference model
  class mips_iss;
    int unsigned dwords;
    logic [31:0] regs [32];
    logic [31:0] dmem [];
    logic [31:0] imem [];
    logic [31:0] pc;
    int unsigned retired;
    int unsigned overflows;

    function new(int unsigned imem_words, int unsigned dmem_words);
      dwords = dmem_words;
      imem = new[imem_words];
      dmem = new[dmem_words];
      foreach (imem[i]) imem[i] = 32'h0;
      foreach (dmem[i]) dmem[i] = 32'h0;
      foreach (regs[i]) regs[i] = 32'h0;
      pc = 0;
      retired = 0;
      overflows = 0;
    endfunction

    function automatic int unsigned widx(logic [31:0] a);
      return (a >> 2) % dwords;
    endfunction

    // executes one instruction; returns 1 when it is a jump to itself
    function automatic bit step();
      logic [31:0] ins, rs, rt, se, ze, next, res, a, w;
      logic [5:0]  op, fn;
      int          d;
      bit          wr, halt;
      ins  = imem[(pc >> 2) % imem.size()];
      op   = ins[31:26];
      fn   = ins[5:0];
      rs   = regs[ins[25:21]];
      rt   = regs[ins[20:16]];
      se   = {{16{ins[15]}}, ins[15:0]};
      ze   = {16'h0, ins[15:0]};
      next = pc + 4;
      wr   = 1'b1;
      d    = int'(ins[20:16]);
      res  = 32'h0;
      halt = 1'b0;
      a    = rs + se;
      case (op)
        6'h00: begin
          d = int'(ins[15:11]);
          case (fn)
            6'h20: begin res = rs + rt; if (rs[31] == rt[31] && res[31] != rs[31]) overflows++; end
            6'h21: res = rs + rt;
            6'h22: begin res = rs - rt; if (rs[31] != rt[31] && res[31] != rs[31]) overflows++; end
            6'h23: res = rs - rt;
            6'h24: res = rs & rt;
            6'h25: res = rs | rt;
            6'h27: res = ~(rs | rt);
            6'h2A: res = {31'h0, $signed(rs) < $signed(rt)};
            6'h2B: res = {31'h0, rs < rt};
            6'h00: res = rt << ins[10:6];
            6'h02: res = rt >> ins[10:6];
            6'h08: begin wr = 1'b0; halt = (rs == pc); next = rs; end
            default: res = rs + rt;
          endcase
        end
        6'h02: begin wr = 1'b0; next = {next[31:28], ins[25:0], 2'b00}; halt = (next == pc); end
        6'h03: begin d = 31; res = pc + 4; next = {next[31:28], ins[25:0], 2'b00}; end
        6'h04: begin wr = 1'b0; if (rs == rt) next = pc + 4 + (se << 2); end
        6'h05: begin wr = 1'b0; if (rs != rt) next = pc + 4 + (se << 2); end
        6'h08: begin res = rs + se; if (rs[31] == se[31] && res[31] != rs[31]) overflows++; end
        6'h0A: res = {31'h0, $signed(rs) < $signed(se)};
        6'h0B: res = {31'h0, rs < se};
        6'h0C: res = rs & ze;
        6'h0D: res = rs | ze;
        6'h0F: res = {ins[15:0], 16'h0};
        6'h23: res = dmem[widx(a)];
        6'h25: begin w = dmem[widx(a)]; res = {16'h0, a[1] ? w[31:16] : w[15:0]}; end
        6'h24: begin w = dmem[widx(a)]; res = {24'h0, w[8*a[1:0] +: 8]}; end
        6'h2B: begin wr = 1'b0; dmem[widx(a)] = rt; end
        6'h29: begin wr = 1'b0; w = dmem[widx(a)];
                 if (a[1]) w[31:16] = rt[15:0]; else w[15:0] = rt[15:0];
                 dmem[widx(a)] = w; end
        6'h28: begin wr = 1'b0; w = dmem[widx(a)]; w[8*a[1:0] +: 8] = rt[7:0];
                 dmem[widx(a)] = w; end
        default: wr = 1'b0;
      endcase
      if (wr && d != 0) regs[d] = res;
      pc = next;
      retired++;
      return halt;
    endfunction

    // runs until the program reaches a jump to itself; returns instructions run
    function automatic int unsigned run(int unsigned limit);
      for (int unsigned n = 0; n < limit; n++)
        if (step()) return retired;
      return retired;
    endfunction
  endclass

endpackage
