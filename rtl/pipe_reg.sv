// pipe_reg: pipeline stage register (IF/ID, ID/EX, EX/MEM, MEM/WB).
//
// Holds one stage's worth of signals, of any packed type T (the stage
// structs of mips_pkg bundle both the data fields and the WB/M/EX control
// fields). On each rising edge it loads d, keeps its value when en is low
// (stall), and loads all zeros when flush is high or during reset. All zeros
// is a bubble: a nop instruction word and a control word that writes nothing.
// flush takes priority over en.
module pipe_reg #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic flush,
  input  T     d,
  output T     q
);
  always_ff @(posedge clk) begin
    if (rst || flush) q <= '0;
    else if (en)      q <= d;
  end
endmodule
