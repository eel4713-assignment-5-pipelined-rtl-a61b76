// alu_control: ALU control of the execute (EX) stage.
//
// The main decoder gives each instruction an operation class (ALUOp). For
// R-type instructions (ALUOP_FUNCT) the function field selects the ALU
// function; for the other classes the class maps directly. Branch compares
// use the non-trapping subtract, so only add, addi and sub ever report
// overflow. An unknown function code yields an unsigned add. Combinational.
module alu_control
  import mips_pkg::*;
(
  input  aluop_t     alu_op,
  input  logic [5:0] funct,
  output alufn_t     alu_fn
);
  always_comb begin
    unique case (alu_op)
      ALUOP_ADDU: alu_fn = ALU_ADDU;
      ALUOP_ADD:  alu_fn = ALU_ADD;
      ALUOP_SUB:  alu_fn = ALU_SUBU;
      ALUOP_AND:  alu_fn = ALU_AND;
      ALUOP_OR:   alu_fn = ALU_OR;
      ALUOP_SLT:  alu_fn = ALU_SLT;
      ALUOP_SLTU: alu_fn = ALU_SLTU;
      ALUOP_LUI:  alu_fn = ALU_LUI;
      ALUOP_FUNCT: begin
        unique case (funct)
          FN_ADD:  alu_fn = ALU_ADD;
          FN_ADDU: alu_fn = ALU_ADDU;
          FN_SUB:  alu_fn = ALU_SUB;
          FN_SUBU: alu_fn = ALU_SUBU;
          FN_AND:  alu_fn = ALU_AND;
          FN_OR:   alu_fn = ALU_OR;
          FN_NOR:  alu_fn = ALU_NOR;
          FN_SLT:  alu_fn = ALU_SLT;
          FN_SLTU: alu_fn = ALU_SLTU;
          FN_SLL:  alu_fn = ALU_SLL;
          FN_SRL:  alu_fn = ALU_SRL;
          default: alu_fn = ALU_ADDU;
        endcase
      end
      default: alu_fn = ALU_ADDU;
    endcase
  end
endmodule
