// data_mem: data memory of the MEM stage.
//
// WORDS words of 32 bits with a byte-enable write port (address, byteena,
// data, wren) and an asynchronous read port q, so a load's data is ready in
// the same cycle its address is. Writes happen on the rising edge, one byte
// lane per set byteena bit. A second read port (dbg_addr/dbg_q) lets a test
// bench inspect memory. The port names follow the original design's RAM
// block; the depth and the asynchronous read are this design's choice.
module data_mem #(
  parameter int unsigned WORDS = 256,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [3:0]    byteena,
  input  logic [31:0]   data,
  input  logic          wren,
  output logic [31:0]   q,
  input  logic [AW-1:0] dbg_addr,
  output logic [31:0]   dbg_q
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wren) begin
      for (int b = 0; b < 4; b++)
        if (byteena[b]) mem[addr][8*b +: 8] <= data[8*b +: 8];
    end
  end

  assign q     = mem[addr];
  assign dbg_q = mem[dbg_addr];
endmodule
