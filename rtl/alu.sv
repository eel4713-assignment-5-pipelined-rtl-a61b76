// alu: 32-bit arithmetic/logic unit of the execute stage.
//
// Operand a comes from the rs forwarding mux, operand b from the ALU-source
// mux (the rt forwarding mux or the extended immediate). Functions: signed
// and unsigned add and subtract, and, or, nor, signed and unsigned
// set-on-less-than, logical shifts of b by shamt, and LUI (b moved into the
// upper half). The zero flag (y == 0) feeds the branch logic in MEM.
// overflow is raised only by the signed add/sub when the two's-complement
// result does not fit; the unsigned forms never raise it. What the processor
// does with overflow is left to the surrounding design. Combinational.
module alu
  import mips_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  shamt,
  input  alufn_t      fn,
  output logic [31:0] y,
  output logic        zero,
  output logic        overflow
);
  logic [31:0] sum, diff;

  assign sum  = a + b;
  assign diff = a - b;

  always_comb begin
    overflow = 1'b0;
    unique case (fn)
      ALU_ADD: begin
        y        = sum;
        overflow = (a[31] == b[31]) && (sum[31] != a[31]);
      end
      ALU_ADDU: y = sum;
      ALU_SUB: begin
        y        = diff;
        overflow = (a[31] != b[31]) && (diff[31] != a[31]);
      end
      ALU_SUBU: y = diff;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'h0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'h0, a < b};
      ALU_SLL:  y = b << shamt;
      ALU_SRL:  y = b >> shamt;
      ALU_LUI:  y = {b[15:0], 16'h0};
      default:  y = sum;
    endcase
  end

  assign zero = (y == 32'h0);
endmodule
