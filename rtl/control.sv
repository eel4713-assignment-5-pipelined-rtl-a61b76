// control: main instruction decoder of the decode (ID) stage.
//
// Turns the opcode (and, for R-type, the function code) into the control word
// that travels down the pipeline with the instruction: WB fields (register
// write, memory-to-register, link), M fields (memory read/write and access
// size, branch/bne, jump, jr) and EX fields (destination select, ALU source,
// ALU operation class, zero extension). It also says which register fields the
// instruction really reads, so that the hazard unit does not stall on an
// unused field. LUI is treated as an ordinary ALU instruction (the ALU places
// the immediate in the upper half), so it forwards like any other result.
// An opcode outside the supported set decodes as a nop. Combinational.
module control
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl          = '0;
    ctrl.alu_op   = ALUOP_ADDU;
    ctrl.mem_size = SZ_WORD;
    unique case (opcode)
      OP_RTYPE: begin
        ctrl.reg_dst = 1'b1;
        ctrl.alu_op  = ALUOP_FUNCT;
        ctrl.uses_rt = 1'b1;
        if (funct == FN_JR) begin
          ctrl.jr      = 1'b1;
          ctrl.uses_rs = 1'b1;
          ctrl.uses_rt = 1'b0;
        end else begin
          ctrl.reg_write = 1'b1;
          ctrl.uses_rs   = !(funct == FN_SLL || funct == FN_SRL);
        end
      end
      OP_J: ctrl.jump = 1'b1;
      OP_JAL: begin
        ctrl.jump      = 1'b1;
        ctrl.link      = 1'b1;
        ctrl.reg_write = 1'b1;
      end
      OP_BEQ, OP_BNE: begin
        ctrl.branch  = 1'b1;
        ctrl.bne     = (opcode == OP_BNE);
        ctrl.alu_op  = ALUOP_SUB;
        ctrl.uses_rs = 1'b1;
        ctrl.uses_rt = 1'b1;
      end
      OP_ADDI, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_LUI: begin
        ctrl.reg_write = 1'b1;
        ctrl.alu_src   = 1'b1;
        ctrl.uses_rs   = (opcode != OP_LUI);
        ctrl.zero_ext  = (opcode == OP_ANDI || opcode == OP_ORI);
        unique case (opcode)
          OP_ADDI:  ctrl.alu_op = ALUOP_ADD;
          OP_SLTI:  ctrl.alu_op = ALUOP_SLT;
          OP_SLTIU: ctrl.alu_op = ALUOP_SLTU;
          OP_ANDI:  ctrl.alu_op = ALUOP_AND;
          OP_ORI:   ctrl.alu_op = ALUOP_OR;
          default:  ctrl.alu_op = ALUOP_LUI;
        endcase
      end
      OP_LW, OP_LHU, OP_LBU: begin
        ctrl.reg_write  = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.mem_read   = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.uses_rs    = 1'b1;
        ctrl.mem_size   = (opcode == OP_LW) ? SZ_WORD :
                          (opcode == OP_LHU) ? SZ_HALF : SZ_BYTE;
      end
      OP_SW, OP_SH, OP_SB: begin
        ctrl.mem_write = 1'b1;
        ctrl.alu_src   = 1'b1;
        ctrl.uses_rs   = 1'b1;
        ctrl.uses_rt   = 1'b1;
        ctrl.mem_size  = (opcode == OP_SW) ? SZ_WORD :
                         (opcode == OP_SH) ? SZ_HALF : SZ_BYTE;
      end
      default: ;  // unsupported: nop
    endcase
  end
endmodule
