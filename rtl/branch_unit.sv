// branch_unit: branching logic and branch mux of the memory (MEM) stage.
//
// Chooses the next PC among three candidates: PC+4 from fetch, the jump/JR
// target carried down from ID and EX (the jump mux in ID picks the j/jal
// target, the JR mux in EX replaces it with the rs value for jr), and the
// branch target computed in EX. A beq is taken when the ALU's zero flag is
// set, a bne when it is clear. redirect is high whenever the next PC is not
// the sequential one; the pipeline then discards the three younger
// instructions in IF, ID and EX. Combinational.
module branch_unit (
  input  logic [31:0] pc_plus4,
  input  logic        mem_branch,
  input  logic        mem_bne,
  input  logic        mem_zero,
  input  logic        mem_jump,          // j, jal or jr in MEM
  input  logic [31:0] mem_jump_target,
  input  logic [31:0] mem_branch_target,
  output logic [31:0] pc_next,
  output logic        redirect
);
  logic taken;

  assign taken = mem_branch && (mem_bne ? !mem_zero : mem_zero);

  always_comb begin
    if (taken)         pc_next = mem_branch_target;
    else if (mem_jump) pc_next = mem_jump_target;
    else               pc_next = pc_plus4;
  end

  assign redirect = taken || mem_jump;
endmodule
