// tb_instr_mem: fills the instruction memory through its load port with
// random words, then reads every word back by byte address (PC) with random
// upper address bits and low bits, which the memory must ignore.
module tb_instr_mem;
  localparam int W = 256;
  logic clk = 0, we = 0;
  logic [31:0] addr = 0, instr, wdata = 0;
  logic [7:0] waddr = 0;
  logic [31:0] model [W];
  int checks = 0, failures = 0;
  instr_mem #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = $urandom(); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 600; i++) begin
      automatic int k = $urandom_range(0, W - 1);
      addr = {1'($urandom_range(0, 1)) ? 22'h1000 : 22'h0, 8'(k), 2'($urandom_range(0, 3))};
      #1; checks++;
      if (instr !== model[k]) begin failures++; $display("FAIL word %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
