// tb_mem_decoder: for every size and byte offset, applies the unit's byte
// enables and lane data to a random memory word (as the data memory would)
// and compares with a byte-by-byte model of sb/sh/sw; and checks lbu/lhu/lw
// extraction with zero extension, including the cases printed in the
// original design's waveforms (0xBAD2BEEF -> 0xBEEF, 0xEF).
module tb_mem_decoder;
  import mips_pkg::*;
  logic [31:0] addr, store_data, mem_q, wdata, load_data; memsize_t size; logic [3:0] byte_en;
  int checks = 0, failures = 0;
  mem_decoder dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(logic [31:0] got, logic [31:0] exp, string w);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s %h %h", w, got, exp); end
  endtask
  initial begin
    addr = 32'h1000_0000; size = SZ_HALF; mem_q = 32'hBAD2_BEEF; store_data = 0; #1;
    chk(load_data, 32'h0000_BEEF, "lhu 0");
    size = SZ_BYTE; #1; chk(load_data, 32'h0000_00EF, "lbu 0");
    for (int i = 0; i < 1500; i++) begin
      logic [7:0] by [4]; logic [31:0] after, e_store, e_load; int o;
      addr = {22'h0, 8'($urandom()), 2'($urandom())};
      size = memsize_t'($urandom_range(0, 2));
      if (size == SZ_WORD) addr[1:0] = 0;
      if (size == SZ_HALF) addr[0] = 0;
      store_data = $urandom(); mem_q = $urandom(); #1;
      o = int'(addr[1:0]);
      for (int b = 0; b < 4; b++) by[b] = mem_q[8*b +: 8];
      case (size)
        SZ_WORD: begin for (int b = 0; b < 4; b++) by[b] = store_data[8*b +: 8]; e_load = mem_q; end
        SZ_HALF: begin by[o] = store_data[7:0]; by[o+1] = store_data[15:8];
                       e_load = {16'h0, mem_q[8*o+8 +: 8], mem_q[8*o +: 8]}; end
        default: begin by[o] = store_data[7:0]; e_load = {24'h0, mem_q[8*o +: 8]}; end
      endcase
      e_store = {by[3], by[2], by[1], by[0]};
      for (int b = 0; b < 4; b++) after[8*b +: 8] = byte_en[b] ? wdata[8*b +: 8] : mem_q[8*b +: 8];
      chk(after, e_store, "store merge");
      chk(load_data, e_load, "load extract");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
