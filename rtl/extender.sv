// extender: immediate extension unit of the decode stage.
//
// Widens the 16-bit immediate field to 32 bits, by copying bit 15 upward
// (sign extension) or by filling with zeros when zero_ext is set. The main
// decoder sets zero_ext for the logical immediates (andi, ori), as MIPS
// defines; every other immediate, including sltiu's, is sign-extended.
// Purely combinational.
module extender (
  input  logic [15:0] imm,
  input  logic        zero_ext,
  output logic [31:0] ext
);
  assign ext = zero_ext ? {16'h0, imm} : {{16{imm[15]}}, imm};
endmodule
