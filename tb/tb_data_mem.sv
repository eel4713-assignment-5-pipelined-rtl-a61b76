// tb_data_mem: fills the memory, then random byte-enabled writes and reads
// on both read ports against a model; a write is visible after the rising
// edge that performs it.
module tb_data_mem;
  localparam int W = 256;
  logic clk = 0, wren = 0; logic [7:0] addr = 0, dbg_addr = 0; logic [3:0] byteena = 0;
  logic [31:0] data = 0, q, dbg_q; logic [31:0] model [W];
  int checks = 0, failures = 0;
  data_mem #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk); wren = 1; addr = 8'(i); byteena = 4'hF; data = $urandom(); model[i] = data;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks += 2;
      if (q !== model[addr]) begin failures++; $display("FAIL q %0d", addr); end
      if (dbg_q !== model[dbg_addr]) begin failures++; $display("FAIL dbg"); end
      wren = 1'($urandom_range(0, 1)); addr = 8'($urandom()); byteena = 4'($urandom());
      data = $urandom(); dbg_addr = 8'($urandom());
      @(posedge clk);
      if (wren) for (int b = 0; b < 4; b++) if (byteena[b]) model[addr][8*b +: 8] = data[8*b +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
