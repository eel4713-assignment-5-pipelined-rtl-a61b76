// mips_pkg: types and constants shared by the pipelined MIPS processor.
//
// Holds the MIPS-I opcode and function-code values of the instructions the
// core executes, the ALU operation classes the main decoder hands to the ALU
// control, the ALU functions, the control word produced in ID and the four
// stage-register structs (IF/ID, ID/EX, EX/MEM, MEM/WB). The encodings are the
// standard MIPS ones; the grouping of control signals into the WB/M/EX fields
// follows the classic five-stage datapath. The enum codings are this design's.
package mips_pkg;

  // Primary opcodes
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_JAL   = 6'h03;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_SLTI  = 6'h0A;
  localparam logic [5:0] OP_SLTIU = 6'h0B;
  localparam logic [5:0] OP_ANDI  = 6'h0C;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_LUI   = 6'h0F;
  localparam logic [5:0] OP_LBU   = 6'h24;
  localparam logic [5:0] OP_LHU   = 6'h25;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SB    = 6'h28;
  localparam logic [5:0] OP_SH    = 6'h29;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // R-type function codes
  localparam logic [5:0] FN_SLL  = 6'h00;
  localparam logic [5:0] FN_SRL  = 6'h02;
  localparam logic [5:0] FN_JR   = 6'h08;
  localparam logic [5:0] FN_ADD  = 6'h20;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUB  = 6'h22;
  localparam logic [5:0] FN_SUBU = 6'h23;
  localparam logic [5:0] FN_AND  = 6'h24;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_NOR  = 6'h27;
  localparam logic [5:0] FN_SLT  = 6'h2A;
  localparam logic [5:0] FN_SLTU = 6'h2B;


  // Operation class from the main decoder (ALUOp)
  typedef enum logic [3:0] {
    ALUOP_ADDU  = 4'd0,  // load/store address (no overflow); also the bubble value
    ALUOP_ADD   = 4'd1,  // addi (signed, reports overflow)
    ALUOP_SUB   = 4'd2,  // beq/bne compare
    ALUOP_FUNCT = 4'd3,  // R-type: look at funct
    ALUOP_AND   = 4'd4,
    ALUOP_OR    = 4'd5,
    ALUOP_SLT   = 4'd6,
    ALUOP_SLTU  = 4'd7,
    ALUOP_LUI   = 4'd8
  } aluop_t;

  // ALU function
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,   // signed add, reports overflow
    ALU_ADDU = 4'd1,
    ALU_SUB  = 4'd2,   // signed subtract, reports overflow
    ALU_SUBU = 4'd3,
    ALU_AND  = 4'd4,
    ALU_OR   = 4'd5,
    ALU_NOR  = 4'd6,
    ALU_SLT  = 4'd7,
    ALU_SLTU = 4'd8,
    ALU_SLL  = 4'd9,
    ALU_SRL  = 4'd10,
    ALU_LUI  = 4'd11
  } alufn_t;

  // Access size for the memory decoding unit
  typedef enum logic [1:0] {
    SZ_WORD = 2'd0,
    SZ_HALF = 2'd1,
    SZ_BYTE = 2'd2
  } memsize_t;

  // Control word decoded in ID
  typedef struct packed {
    // WB
    logic     reg_write;
    logic     mem_to_reg;
    logic     link;        // jal: write PC+4 to $31
    // M
    logic     mem_read;
    logic     mem_write;
    memsize_t mem_size;
    logic     branch;      // beq or bne
    logic     bne;         // branch on not equal
    logic     jump;        // j / jal
    logic     jr;
    // EX
    logic     reg_dst;     // 1: rd, 0: rt
    logic     alu_src;     // 1: immediate
    aluop_t   alu_op;
    logic     zero_ext;    // immediate is zero-extended
    logic     uses_rs;     // instruction reads rs as a register operand
    logic     uses_rt;     // instruction reads rt as a register operand
  } ctrl_t;

  typedef struct packed {
    logic [31:0] pc_plus4;
    logic [31:0] instr;
  } if_id_t;

  typedef struct packed {
    ctrl_t       ctrl;
    logic [31:0] pc_plus4;
    logic [31:0] jump_target;  // output of the jump mux
    logic [31:0] rs_data;
    logic [31:0] rt_data;
    logic [31:0] imm;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  rd;
    logic [4:0]  shamt;
    logic [5:0]  funct;
  } id_ex_t;

  typedef struct packed {
    ctrl_t       ctrl;
    logic [31:0] branch_target;
    logic [31:0] jump_target;  // output of the JR mux
    logic        zero;
    logic [31:0] result;       // ALU result, or PC+4 for jal
    logic [31:0] store_data;
    logic [4:0]  dest;
  } ex_mem_t;

  typedef struct packed {
    ctrl_t       ctrl;
    logic [31:0] result;
    logic [31:0] load_data;
    logic [4:0]  dest;
  } mem_wb_t;

endpackage
