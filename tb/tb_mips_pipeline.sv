// tb_mips_pipeline: end-to-end test of the five-stage MIPS core at its
// default sizes (256-word instruction and data memories).
//
// Each program is loaded through the memory load ports while reset is held,
// then run until it spins in its closing jump-to-self. Every program is also
// run on the unpipelined reference model of mips_asm_pkg; afterwards all 32
// registers and the whole data memory must match the model, and selected
// registers must hold values worked out by hand. The programs are the
// instruction-group tests (jr, logical, branch, set-less-than, add/sub,
// stores, loads), a loop with a subroutine call, the hazard program of the
// original design (its final $1..$4 are known), and random programs full of
// back-to-back dependences. Timing checks: results retire one per cycle
// (first write-back in the fifth cycle), a load-use stall costs one cycle and
// a taken transfer three. The bench counts how often each pipeline mechanism
// fired (EX/MEM and MEM/WB forwarding on both ALU inputs, store-data
// forwarding, load-use stall, taken branch, j, jal, jr, overflow) and fails if
// one never did.
module tb_mips_pipeline;
  import mips_asm_pkg::*;

  localparam int IW = 256;
  localparam int DW = 256;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        imem_we = 1'b0, dmem_we = 1'b0;
  logic [7:0]  imem_waddr = '0, dmem_waddr = '0;
  logic [31:0] imem_wdata = '0, dmem_wdata = '0;
  logic [4:0]  dbg_reg_addr = '0;
  logic [31:0] dbg_reg_data, dbg_dmem_data, pc;
  logic [7:0]  dbg_dmem_addr = '0;
  logic        overflow;

  int checks = 0, failures = 0;
  longint cycle = 0;

  mips_pipeline dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_fwd_a_mem, n_fwd_a_wb, n_fwd_b_mem, n_fwd_b_wb, n_fwd_store, n_stall;
  int n_branch, n_jump, n_jal, n_jr, n_ovf;
  int n_ovf_prog;
  longint wb_cycle[$];  // cycles of register write-backs of the current program

  always @(posedge clk) if (!rst) begin
    if (dut.sel_a == 2'd2 && dut.idex.ctrl.uses_rs) n_fwd_a_mem++;
    if (dut.sel_a == 2'd1 && dut.idex.ctrl.uses_rs) n_fwd_a_wb++;
    if (dut.sel_b == 2'd2 && dut.idex.ctrl.uses_rt) n_fwd_b_mem++;
    if (dut.sel_b == 2'd1 && dut.idex.ctrl.uses_rt) n_fwd_b_wb++;
    if (dut.sel_b != 2'd0 && dut.idex.ctrl.mem_write) n_fwd_store++;
    if (dut.stall && !dut.redirect) n_stall++;
    if (dut.redirect) begin
      if (dut.exmem.ctrl.branch) n_branch++;
      else if (dut.exmem.ctrl.jr) n_jr++;
      else if (dut.exmem.ctrl.link) n_jal++;
      else n_jump++;
    end
    if (overflow) begin n_ovf++; n_ovf_prog++; end
    if (dut.memwb.ctrl.reg_write && dut.memwb.dest != 0) wb_cycle.push_back(cycle);
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  task automatic check_reg(string what, int r, logic [31:0] exp);
    dbg_reg_addr = 5'(r);
    #1;
    check(what, dbg_reg_data, exp);
  endtask

  mips_iss iss;
  logic [31:0] prog[$];
  logic [31:0] dinit[$];
  longint start_cycle;

  task automatic load_and_run(string name);
    int unsigned n;
    iss = new(IW, DW);
    foreach (prog[i]) iss.imem[i] = prog[i];
    foreach (dinit[i]) iss.dmem[i] = dinit[i];
    n = iss.run(100000);
    // load the core
    rst = 1'b1;
    @(negedge clk);
    for (int i = 0; i < IW; i++) begin
      imem_we = 1'b1; imem_waddr = 8'(i); imem_wdata = (i < prog.size()) ? prog[i] : 32'h0;
      dmem_we = 1'b1; dmem_waddr = 8'(i); dmem_wdata = (i < dinit.size()) ? dinit[i] : 32'h0;
      @(negedge clk);
    end
    imem_we = 1'b0; dmem_we = 1'b0;
    @(negedge clk);
    wb_cycle.delete();
    n_ovf_prog = 0;
    // release reset just after a rising edge: the next rising edge starts cycle 0
    @(posedge clk);
    #1 rst = 1'b0;
    start_cycle = cycle;
    repeat (4 * n + 40) @(posedge clk);
    @(negedge clk);
    for (int r = 0; r < 32; r++) check_reg($sformatf("%s reg %0d vs model", name, r), r, iss.regs[r]);
    for (int i = 0; i < DW; i++) begin
      dbg_dmem_addr = 8'(i);
      #1;
      check($sformatf("%s dmem[%0d] vs model", name, i), dbg_dmem_data, iss.dmem[i]);
    end
    checks++;
    if (n_ovf_prog != int'(iss.overflows)) begin
      failures++;
      $display("FAIL %s: %0d overflows, model %0d", name, n_ovf_prog, iss.overflows);
    end
  endtask

  function automatic int wb_rel(int k);  // cycle of the k-th write-back, from release
    return (k < wb_cycle.size()) ? int'(wb_cycle[k] - start_cycle) : -1;
  endfunction

  task automatic check_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // register names
  localparam int A0 = 4, A1 = 5, A2 = 6, A3 = 7, T0 = 8, T1 = 9, T2 = 10, T3 = 11, T4 = 12;
  localparam int T5 = 13, T6 = 14, T7 = 15, S0 = 16, S1 = 17, S2 = 18, S3 = 19, S4 = 20;
  localparam int S5 = 21, S6 = 22, T8 = 24;

  task automatic random_program(int unsigned seed, int len);
    int k, r;
    void'($urandom(seed));
    prog.delete(); dinit.delete();
    for (int i = 0; i < 64; i++) dinit.push_back($urandom());
    prog.push_back(LUI(29, 'h1000));
    for (int i = 1; i <= 8; i++) prog.push_back(ORI(i, 0, $urandom_range(0, 'hFFFF)));
    for (int i = 0; i < len; i++) begin
      int d = $urandom_range(1, 8), s = $urandom_range(0, 8), t = $urandom_range(0, 8);
      int imm = $urandom_range(0, 'hFFFF);
      int left = len - 1 - i;
      r = $urandom_range(0, 99);
      if (r < 30) begin
        case ($urandom_range(0, 10))
          0: prog.push_back(ADD(d, s, t));   1: prog.push_back(ADDU(d, s, t));
          2: prog.push_back(SUB(d, s, t));   3: prog.push_back(SUBU(d, s, t));
          4: prog.push_back(AND(d, s, t));   5: prog.push_back(OR(d, s, t));
          6: prog.push_back(NOR(d, s, t));   7: prog.push_back(SLT(d, s, t));
          8: prog.push_back(SLTU(d, s, t));  9: prog.push_back(SLL(d, t, $urandom_range(0, 31)));
          default: prog.push_back(SRL(d, t, $urandom_range(0, 31)));
        endcase
      end else if (r < 55) begin
        case ($urandom_range(0, 5))
          0: prog.push_back(ADDI(d, s, imm));  1: prog.push_back(SLTI(d, s, imm));
          2: prog.push_back(SLTIU(d, s, imm)); 3: prog.push_back(ANDI(d, s, imm));
          4: prog.push_back(ORI(d, s, imm));   default: prog.push_back(LUI(d, imm));
        endcase
      end else if (r < 72) begin
        k = $urandom_range(0, 255);
        case ($urandom_range(0, 2))
          0: prog.push_back(LW(d, k & ~3, 29));
          1: prog.push_back(LHU(d, k & ~1, 29));
          default: prog.push_back(LBU(d, k, 29));
        endcase
      end else if (r < 88) begin
        k = $urandom_range(0, 255);
        case ($urandom_range(0, 2))
          0: prog.push_back(SW(t, k & ~3, 29));
          1: prog.push_back(SH(t, k & ~1, 29));
          default: prog.push_back(SB(t, k, 29));
        endcase
      end else begin
        k = (left > 3) ? $urandom_range(0, 3) : 0;
        if (1'($urandom_range(0, 1)) == 1) prog.push_back(BEQ(s, t, k));
        else prog.push_back(BNE(s, t, k));
      end
    end
    prog.push_back(J(4 * prog.size()));
  endtask

  int t_first, t_ld, t_use;

  initial begin
    n_fwd_a_mem = 0; n_fwd_a_wb = 0; n_fwd_b_mem = 0; n_fwd_b_wb = 0; n_fwd_store = 0;
    n_stall = 0; n_branch = 0; n_jump = 0; n_jal = 0; n_jr = 0; n_ovf = 0; n_ovf_prog = 0;
    repeat (3) @(posedge clk);

    // ---- jr: lui/ori build the target, both forwarded into the JR mux
    prog = '{LUI(7, 0), ORI(7, 7, 'h308), JR(7), ORI(9, 0, 1), ORI(10, 0, 2), ORI(11, 0, 3),
             J(24)};
    while (prog.size() < 'h308 / 4) prog.push_back(32'h0);
    prog.push_back(LUI(30, 'h1000));
    prog.push_back(ORI(8, 0, 'h55));
    prog.push_back(J('h310));
    dinit.delete();
    load_and_run("jr");
    check_reg("jr $7", 7, 32'h0000_0308);
    check_reg("jr flushed $9", 9, 32'h0);
    check_reg("jr flushed $10", 10, 32'h0);
    check_reg("jr target $30", 30, 32'h1000_0000);
    check_reg("jr target $8", 8, 32'h55);

    // ---- logical functions
    prog = '{LUI(A0, 'h2568), LUI(A1, 'h3A97), ORI(A0, A0, 'hABEF), ORI(A1, A1, 'h5BE0),
             AND(A2, A0, A1), ANDI(A3, A0, 'h4510), OR(S0, A0, A1), NOR(S1, A0, A1),
             SLL(S2, A0, 4), SRL(S3, A0, 2), J(40)};
    load_and_run("logical");
    check_reg("logical a0", A0, 32'h2568_ABEF);
    check_reg("logical a1", A1, 32'h3A97_5BE0);
    check_reg("logical and", A2, 32'h2000_0BE0);
    check_reg("logical andi", A3, 32'h0000_0100);
    check_reg("logical or", S0, 32'h3FFF_FBEF);
    check_reg("logical nor", S1, 32'hC000_0410);
    check_reg("logical sll", S2, 32'h568A_BEF0);
    check_reg("logical srl", S3, 32'h095A_2AFB);
    // one result per cycle, the first in the fifth cycle after reset
    check_int("logical first write-back cycle", wb_rel(0), 4);
    check_int("logical tenth write-back cycle", wb_rel(9), 13);

    // ---- branches
    prog = '{ORI(S0, 0, 'h1000), ORI(S1, 0, 'h2000), ORI(S2, 0, 'h1000),
             BEQ(S0, S1, 2), BEQ(S0, S2, 1), LUI(S4, 'hFFFF),
             BNE(S0, S2, 2), BNE(S0, A1, 1), LUI(S5, 'hFFFF), LUI(S6, 'hFFFF), J(40)};
    load_and_run("branch");
    check_reg("branch s4 skipped", S4, 32'h0);
    check_reg("branch s5 skipped", S5, 32'h0);
    check_reg("branch s6", S6, 32'hFFFF_0000);
    // Instruction k is fetched in cycle k and reaches MEM in k+3. The taken
    // beq (index 4) redirects from MEM in cycle 7, so index 6 is fetched in
    // cycle 8; the taken bne (index 7, fetched 9) redirects in cycle 12, so
    // the final lui (index 9) is fetched in 13 and writes back in 17: three
    // cycles lost per taken transfer.
    check_int("branch lui s6 write-back cycle", wb_rel(3), 17);

    // ---- set on less than
    prog = '{LUI(A0, 'hFF11), LUI(S0, 'hFFFF), ORI(S0, S0, 'hFFFF), ORI(S1, S1, 'h1234),
             ORI(S2, S2, 'h2345), SLT(T0, S1, S2), SLT(T1, S2, S1), SLTU(T3, S0, S1),
             SLTU(T4, S1, A0), SLTI(T5, S1, 'h4000), SLTI(T6, S2, 'h1900),
             SLTIU(T7, A0, -6), SLTIU(T8, A0, 'h4161), SLT(S3, S0, S1), SLTU(S4, S0, S1),
             J(60)};
    load_and_run("slt");
    check_reg("slt t0", T0, 1);  check_reg("slt t1", T1, 0);
    check_reg("sltu t3", T3, 0); check_reg("sltu t4", T4, 1);
    check_reg("slti t5", T5, 1); check_reg("slti t6", T6, 0);
    check_reg("sltiu t7", T7, 1); check_reg("sltiu t8", T8, 0);
    check_reg("slt -1<4660", S3, 1); check_reg("sltu 0xffffffff<0x1234", S4, 0);

    // ---- add / sub, signed forms report overflow
    prog = '{LUI(S0, 'h8193), ADDI(S1, S1, 'h2468), ADDI(S2, S2, 'h1234),
             ADD(T0, S1, S2), ADDU(T1, S0, S1), ADDU(T2, S1, S2), SUB(T3, S1, S0),
             SUB(T4, S1, S2), SUBU(T5, S1, S0), SUBU(T6, S1, S2), ADD(T7, S0, S0),
             ADDU(T8, S0, S0), J(48)};
    load_and_run("addsub");
    check_reg("add t0", T0, 32'h369C);       check_reg("addu t1", T1, 32'h8193_2468);
    check_reg("addu t2", T2, 32'h369C);      check_reg("sub t3", T3, 32'h7E6D_2468);
    check_reg("sub t4", T4, 32'h1234);       check_reg("subu t5", T5, 32'h7E6D_2468);
    check_reg("subu t6", T6, 32'h1234);      check_reg("add overflow result", T7, 32'h0326_0000);
    check_int("addsub overflow count", n_ovf_prog, 1);

    // ---- stores sb / sh / sw, read back with lw
    prog = '{LUI(9, 'h1000), LUI(15, 0), ORI(15, 15, 0), SW(15, 0, 9), SW(15, 4, 9), SW(15, 8, 9),
             LUI(10, 'hABCD), ORI(10, 10, 'h1234), LUI(2, 'hFFFF), LUI(3, 'hFFFF),
             SB(10, 0, 9), SH(10, 4, 9), SW(10, 8, 9), LW(11, 0, 9), LW(12, 4, 9), LW(13, 8, 9),
             ADD(14, 13, 12), J(68)};
    for (int i = 0; i < 4; i++) dinit.push_back(32'hDEAD_BEEF);
    load_and_run("store");
    check_reg("sb then lw", 11, 32'h34);
    check_reg("sh then lw", 12, 32'h1234);
    check_reg("sw then lw", 13, 32'hABCD_1234);
    check_reg("load-use add", 14, 32'hABCD_2468);
    // write-backs 9 and 10 are lw $13 and the dependent add: one stall cycle
    t_ld = wb_rel(9); t_use = wb_rel(10);
    check_int("load-use stall costs one cycle", t_use - t_ld, 2);

    // ---- loads lw / lhu / lbu
    prog = '{LUI(S0, 'h1000), LUI(T0, 'hBAD2), ORI(T0, T0, 'hBEEF), ORI(S2, S2, 0),
             ORI(S2, S2, 0), SW(T0, 0, S0), LW(T1, 0, S0), LHU(T2, 0, S0), LBU(T3, 0, S0),
             LHU(T4, 2, S0), LBU(T5, 3, S0), SW(T5, 4, S0), J(48)};
    dinit.delete();
    load_and_run("load");
    check_reg("lw", T1, 32'hBAD2_BEEF);
    check_reg("lhu", T2, 32'h0000_BEEF);
    check_reg("lbu", T3, 32'h0000_00EF);
    check_reg("lhu upper", T4, 32'h0000_BAD2);
    check_reg("lbu top", T5, 32'h0000_00BA);

    // ---- loop with a subroutine call
    prog = '{LUI(29, 'h1000), ORI(1, 0, 0), ORI(2, 0, 5), ADD(1, 1, 2), ADDI(2, 2, -1),
             BNE(2, 0, -3), JAL(48), SW(1, 0, 29), LW(4, 0, 29), ADD(5, 4, 3), J(40), 32'h0,
             ADDI(3, 31, 0), SLL(6, 3, 2), JR(31)};
    load_and_run("loop");
    check_reg("loop sum", 1, 15);
    check_reg("loop counter", 2, 0);
    check_reg("link", 31, 28);
    check_reg("sub $3", 3, 28);
    check_reg("sub $6", 6, 112);
    check_reg("after return $5", 5, 43);

    // ---- hazard program: a byte-mixing loop full of load-use, forwarding
    // and branch hazards. Words 7..34 are the original program's instruction
    // words; words 0..6 build the initial table 00 01 02 03 08 09 0A 0B at
    // 0x10000000. The loop reads byte i and byte i+4, mixes them with
    // compare-and-add/subtract steps and stores the result at byte i+8.
    prog = '{LUI(29, 'h1000), LUI(5, 'h0302), ORI(5, 5, 'h0100), SW(5, 0, 29),
             ORI(6, 0, 'h0908), SH(6, 4, 29), ORI(6, 0, 'h0B0A),
             32'hA7A6_0006, 32'h3C1E_1000, 32'h37DE_0008, 32'h03C0_7820,
             32'h93B2_0000, 32'h93B1_0004, 32'h0232_8020, 32'h2A0A_000B, 32'h1140_0002,
             32'h0212_8820, 32'h0810_0013, 32'h0212_8822, 32'h2A2A_000B, 32'h1140_0002,
             32'h0230_9020, 32'h0810_0018, 32'h0211_9022, 32'hA3D2_0000, 32'h23DE_0001,
             32'h23BD_0001, 32'h17AF_FFEF, 32'h3413_0008, 32'h03B3_E823,
             32'h8FA1_0000, 32'h8FA2_0004, 32'h8FA3_0008, 32'h8FA4_000C, 32'h0810_0022};
    dinit.delete();
    load_and_run("hazard");
    check_reg("hazard $1", 1, 32'h0302_0100);
    check_reg("hazard $2", 2, 32'h0B0A_0908);
    check_reg("hazard $3", 3, 32'h0316_FF10);
    check_reg("hazard $4", 4, 32'h110A_0908);

    // ---- random programs against the reference model
    for (int s = 1; s <= 12; s++) begin
      random_program(s * 7919, 180);
      load_and_run($sformatf("random%0d", s));
    end

    check_int("mechanism: forward EX/MEM to ALU a", int'(n_fwd_a_mem > 0), 1);
    check_int("mechanism: forward MEM/WB to ALU a", int'(n_fwd_a_wb > 0), 1);
    check_int("mechanism: forward EX/MEM to ALU b", int'(n_fwd_b_mem > 0), 1);
    check_int("mechanism: forward MEM/WB to ALU b", int'(n_fwd_b_wb > 0), 1);
    check_int("mechanism: store-data forward", int'(n_fwd_store > 0), 1);
    check_int("mechanism: load-use stall", int'(n_stall > 0), 1);
    check_int("mechanism: taken branch flush", int'(n_branch > 0), 1);
    check_int("mechanism: jump", int'(n_jump > 0), 1);
    check_int("mechanism: jal", int'(n_jal > 0), 1);
    check_int("mechanism: jr", int'(n_jr > 0), 1);
    check_int("mechanism: overflow", int'(n_ovf > 0), 1);
    $display("mechanisms: fwdA mem=%0d wb=%0d fwdB mem=%0d wb=%0d store=%0d stall=%0d branch=%0d j=%0d jal=%0d jr=%0d ovf=%0d",
             n_fwd_a_mem, n_fwd_a_wb, n_fwd_b_mem, n_fwd_b_wb, n_fwd_store, n_stall,
             n_branch, n_jump, n_jal, n_jr, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
