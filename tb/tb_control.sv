// tb_control: decodes one instruction of every supported kind plus an
// unsupported opcode and compares the whole control word with the expected
// one, written out field by field from the MIPS instruction definitions.
module tb_control;
  import mips_pkg::*;
  logic [5:0] opcode, funct; ctrl_t ctrl;
  int checks = 0, failures = 0;
  control dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // fields: regw m2r link mrd mwr size br bne j jr dst src aluop zext rs rt
  task automatic t(string nm, logic [5:0] op, logic [5:0] fn,
                   bit rw, bit m2r, bit lk, bit mr, bit mw, memsize_t sz, bit br, bit bn,
                   bit j, bit jr, bit dst, bit src, aluop_t ao, bit ze, bit urs, bit urt);
    ctrl_t e;
    e = '{reg_write: rw, mem_to_reg: m2r, link: lk, mem_read: mr, mem_write: mw, mem_size: sz,
          branch: br, bne: bn, jump: j, jr: jr, reg_dst: dst, alu_src: src, alu_op: ao,
          zero_ext: ze, uses_rs: urs, uses_rt: urt};
    opcode = op; funct = fn; #1; checks++;
    if (ctrl !== e) begin failures++; $display("FAIL %s got %h exp %h", nm, ctrl, e); end
  endtask
  initial begin
    //        name    op     fn     rw m2r lk mr mw size     br bn j jr dst src aluop        ze rs rt
    t("add",  6'h00, 6'h20, 1, 0, 0, 0, 0, SZ_WORD, 0, 0, 0, 0, 1, 0, ALUOP_FUNCT, 0, 1, 1);
    t("nor",  6'h00, 6'h27, 1, 0, 0, 0, 0, SZ_WORD, 0, 0, 0, 0, 1, 0, ALUOP_FUNCT, 0, 1, 1);
    t("sll",  6'h00, 6'h00, 1, 0, 0, 0, 0, SZ_WORD, 0, 0, 0, 0, 1, 0, ALUOP_FUNCT, 0, 0, 1);
    t("srl",  6'h00, 6'h02, 1, 0, 0, 0, 0, SZ_WORD, 0, 0, 0, 0, 1, 0, ALUOP_FUNCT, 0, 0, 1);
    t("jr",   6'h00, 6'h08, 0, 0, 0, 0, 0, SZ_WORD, 0, 0, 0, 1, 1, 0, ALUOP_FUNCT, 0, 1, 0);
    t("j",    6'h02, 6'h15, 0, 0, 0, 0, 0, SZ_WORD, 0, 0, 1, 0, 0, 0, ALUOP_ADDU,  0, 0, 0);
    t("jal",  6'h03, 6'h00, 1, 0, 1, 0, 0, SZ_WORD, 0, 0, 1, 0, 0, 0, ALUOP_ADDU,  0, 0, 0);
    t("beq",  6'h04, 6'h00, 0, 0, 0, 0, 0, SZ_WORD, 1, 0, 0, 0, 0, 0, ALUOP_SUB,   0, 1, 1);
    t("bne",  6'h05, 6'h00, 0, 0, 0, 0, 0, SZ_WORD, 1, 1, 0, 0, 0, 0, ALUOP_SUB,   0, 1, 1);
    t("addi", 6'h08, 6'h00, 1, 0, 0, 0, 0, SZ_WORD, 0, 0, 0, 0, 0, 1, ALUOP_ADD,   0, 1, 0);
    t("slti", 6'h0A, 6'h00, 1, 0, 0, 0, 0, SZ_WORD, 0, 0, 0, 0, 0, 1, ALUOP_SLT,   0, 1, 0);
    t("sltiu",6'h0B, 6'h00, 1, 0, 0, 0, 0, SZ_WORD, 0, 0, 0, 0, 0, 1, ALUOP_SLTU,  0, 1, 0);
    t("andi", 6'h0C, 6'h00, 1, 0, 0, 0, 0, SZ_WORD, 0, 0, 0, 0, 0, 1, ALUOP_AND,   1, 1, 0);
    t("ori",  6'h0D, 6'h00, 1, 0, 0, 0, 0, SZ_WORD, 0, 0, 0, 0, 0, 1, ALUOP_OR,    1, 1, 0);
    t("lui",  6'h0F, 6'h00, 1, 0, 0, 0, 0, SZ_WORD, 0, 0, 0, 0, 0, 1, ALUOP_LUI,   0, 0, 0);
    t("lw",   6'h23, 6'h00, 1, 1, 0, 1, 0, SZ_WORD, 0, 0, 0, 0, 0, 1, ALUOP_ADDU,  0, 1, 0);
    t("lhu",  6'h25, 6'h00, 1, 1, 0, 1, 0, SZ_HALF, 0, 0, 0, 0, 0, 1, ALUOP_ADDU,  0, 1, 0);
    t("lbu",  6'h24, 6'h00, 1, 1, 0, 1, 0, SZ_BYTE, 0, 0, 0, 0, 0, 1, ALUOP_ADDU,  0, 1, 0);
    t("sw",   6'h2B, 6'h00, 0, 0, 0, 0, 1, SZ_WORD, 0, 0, 0, 0, 0, 1, ALUOP_ADDU,  0, 1, 1);
    t("sh",   6'h29, 6'h00, 0, 0, 0, 0, 1, SZ_HALF, 0, 0, 0, 0, 0, 1, ALUOP_ADDU,  0, 1, 1);
    t("sb",   6'h28, 6'h00, 0, 0, 0, 0, 1, SZ_BYTE, 0, 0, 0, 0, 0, 1, ALUOP_ADDU,  0, 1, 1);
    t("bad",  6'h3F, 6'h00, 0, 0, 0, 0, 0, SZ_WORD, 0, 0, 0, 0, 0, 0, ALUOP_ADDU,  0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
