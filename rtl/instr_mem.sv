// instr_mem: instruction memory of the fetch stage.
//
// A word-addressed memory of WORDS 32-bit instructions read asynchronously:
// the word index is the byte address divided by four (addr[AW+1:2]), so a PC
// of 0x64 reads word 0x19. Higher address bits are ignored, which lets jump
// targets built with the 0x0040_0000 text base land in the same words (so
// the unused upper and lowest address bits are intentional). The
// memory is filled through a synchronous write port (we/waddr/wdata) before
// the program runs; in a hardware build this port would be driven by a loader
// or replaced by an initialised ROM. Depth and read timing are this design's
// choice.
module instr_mem #(
  parameter int unsigned WORDS = 256,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [31:0]   addr,
  output logic [31:0]   instr,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign instr = mem[addr[AW+1:2]];
endmodule
