// forwarding_unit: selects the sources of the two ALU forwarding muxes.
//
// Each ALU operand in EX passes through a four-input mux. Select codes:
//   0  the register value read in ID (no hazard)
//   1  the write-back data of the instruction in MEM/WB (two places ahead)
//   2  the result held in EX/MEM (the instruction one place ahead)
//   3  unused (the mux input is tied to zero)
// The nearer producer wins when both match. A producer that does not write a
// register, or writes $0, is never forwarded. A producer three places ahead
// needs no forwarding because the register file writes on the falling edge.
// The mux for rt also feeds the store-data path, so stores receive forwarded
// data the same way ALU operands do. Codes 0 and 2 are the ones the original
// design's waveforms show; code 1 for write-back is this design's assignment.
// Combinational.
module forwarding_unit (
  input  logic [4:0] ex_rs,
  input  logic [4:0] ex_rt,
  input  logic [4:0] mem_rd,
  input  logic       mem_regwrite,
  input  logic [4:0] wb_rd,
  input  logic       wb_regwrite,
  output logic [1:0] sel_a,
  output logic [1:0] sel_b
);
  localparam logic [1:0] FWD_NONE = 2'd0;
  localparam logic [1:0] FWD_WB   = 2'd1;
  localparam logic [1:0] FWD_MEM  = 2'd2;

  function automatic logic [1:0] pick(input logic [4:0] src);
    if (mem_regwrite && mem_rd != 5'd0 && mem_rd == src) return FWD_MEM;
    if (wb_regwrite && wb_rd != 5'd0 && wb_rd == src)    return FWD_WB;
    return FWD_NONE;
  endfunction

  assign sel_a = pick(ex_rs);
  assign sel_b = pick(ex_rt);
endmodule
