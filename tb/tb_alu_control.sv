// tb_alu_control: the full mapping from operation class and function code to
// ALU function, checked against a table written from the MIPS definitions.
module tb_alu_control;
  import mips_pkg::*;
  aluop_t alu_op; logic [5:0] funct; alufn_t alu_fn;
  int checks = 0, failures = 0;
  alu_control dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic t(aluop_t op, logic [5:0] f, alufn_t e);
    alu_op = op; funct = f; #1; checks++;
    if (alu_fn !== e) begin failures++; $display("FAIL %0d %h -> %0d exp %0d", op, f, alu_fn, e); end
  endtask
  initial begin
    t(ALUOP_ADDU, 6'h22, ALU_ADDU); t(ALUOP_ADD, 6'h00, ALU_ADD); t(ALUOP_SUB, 6'h20, ALU_SUBU);
    t(ALUOP_AND, 0, ALU_AND); t(ALUOP_OR, 0, ALU_OR); t(ALUOP_SLT, 0, ALU_SLT);
    t(ALUOP_SLTU, 0, ALU_SLTU); t(ALUOP_LUI, 0, ALU_LUI);
    t(ALUOP_FUNCT, 6'h20, ALU_ADD); t(ALUOP_FUNCT, 6'h21, ALU_ADDU); t(ALUOP_FUNCT, 6'h22, ALU_SUB);
    t(ALUOP_FUNCT, 6'h23, ALU_SUBU); t(ALUOP_FUNCT, 6'h24, ALU_AND); t(ALUOP_FUNCT, 6'h25, ALU_OR);
    t(ALUOP_FUNCT, 6'h27, ALU_NOR); t(ALUOP_FUNCT, 6'h2A, ALU_SLT); t(ALUOP_FUNCT, 6'h2B, ALU_SLTU);
    t(ALUOP_FUNCT, 6'h00, ALU_SLL); t(ALUOP_FUNCT, 6'h02, ALU_SRL); t(ALUOP_FUNCT, 6'h08, ALU_ADDU);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
