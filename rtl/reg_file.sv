// reg_file: 32 x 32-bit MIPS register file of the decode (ID) stage.
//
// Two asynchronous read ports (rs, rt) and one write port. The write happens
// on the FALLING clock edge: the write-back stage presents its data after the
// rising edge, the register file stores it half a cycle later, and an
// instruction being decoded in the same cycle already reads the new value.
// This removes the need to forward from write-back to an instruction three
// places behind the producer. Register 0 is never written and reads as 0.
// A synchronous reset (sampled on the falling edge) clears all registers.
// A third read port (dbg_addr/dbg_data) lets a test bench or debugger watch
// the architectural state.
module reg_file (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  output logic [31:0] rd1,
  output logic [31:0] rd2,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd,
  input  logic [4:0]  dbg_addr,
  output logic [31:0] dbg_data
);
  logic [31:0] regs [32];

  always_ff @(negedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) regs[i] <= 32'h0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1      = (ra1 == 5'd0) ? 32'h0 : regs[ra1];
  assign rd2      = (ra2 == 5'd0) ? 32'h0 : regs[ra2];
  assign dbg_data = (dbg_addr == 5'd0) ? 32'h0 : regs[dbg_addr];
endmodule
