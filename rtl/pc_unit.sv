// pc_unit: program counter and PC+4 incrementer of the fetch (IF) stage.
//
// The PC register loads pc_next on every rising clock edge unless en is low,
// which the hazard unit uses to hold the fetch address during a load-use
// stall. pc_plus4 is the combinational incrementer output; it is both carried
// down the pipeline and offered to the branch mux as the sequential next PC.
// Reset clears the PC to 0, where the program starts (this reset value is a
// choice of this design). Timing: one register, one adder.
module pc_unit (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [31:0] pc_next,
  output logic [31:0] pc,
  output logic [31:0] pc_plus4
);
  always_ff @(posedge clk) begin
    if (rst)     pc <= 32'h0;
    else if (en) pc <= pc_next;
  end

  assign pc_plus4 = pc + 32'd4;
endmodule
