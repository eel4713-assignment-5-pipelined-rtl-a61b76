// mem_decoder: decoding unit between the pipeline and the data memory.
//
// The data memory is 32 bits wide with one write enable per byte. For a store
// the unit turns the byte address and access size into byte enables and
// copies the low byte or halfword of the store data into every lane, so the
// enabled lane receives it: sw writes all four bytes, sh the half selected by
// addr[1], sb the byte selected by addr[1:0]. For a load it picks the
// addressed byte or halfword out of the memory word and zero-extends it
// (lbu, lhu); lw passes the word through. Byte 0 is the least significant
// byte of the word (little-endian lane order). Only addr[1:0] is used here:
// the data memory takes the word index from the upper bits itself, so the
// lint report of unused address bits is expected. Combinational.
module mem_decoder
  import mips_pkg::*;
(
  input  logic [31:0] addr,
  input  memsize_t    size,
  input  logic [31:0] store_data,
  input  logic [31:0] mem_q,
  output logic [3:0]  byte_en,
  output logic [31:0] wdata,
  output logic [31:0] load_data
);
  always_comb begin
    unique case (size)
      SZ_HALF: begin
        byte_en   = addr[1] ? 4'b1100 : 4'b0011;
        wdata     = {2{store_data[15:0]}};
        load_data = {16'h0, addr[1] ? mem_q[31:16] : mem_q[15:0]};
      end
      SZ_BYTE: begin
        byte_en   = 4'b0001 << addr[1:0];
        wdata     = {4{store_data[7:0]}};
        load_data = {24'h0, mem_q[8*addr[1:0] +: 8]};
      end
      default: begin
        byte_en   = 4'b1111;
        wdata     = store_data;
        load_data = mem_q;
      end
    endcase
  end
endmodule
