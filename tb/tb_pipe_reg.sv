// tb_pipe_reg: a stage register of a packed struct type with random enable
// and flush, against a model: reset and flush give all zeros, flush beats
// enable, en low holds the value.
module tb_pipe_reg;
  import mips_pkg::*;
  logic clk = 0, rst = 1, en = 0, flush = 0;
  if_id_t d = '0, q, model;
  int checks = 0, failures = 0;
  pipe_reg #(.T(if_id_t)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    d = '{pc_plus4: 32'h1111_1111, instr: 32'h2222_2222}; en = 1;
    @(posedge clk); #1; rst = 0; model = '0;
    for (int i = 0; i < 500; i++) begin
      checks++;
      if (q !== model) begin failures++; $display("FAIL %h %h", q, model); end
      @(negedge clk);
      en = $urandom_range(0, 3) != 0; flush = $urandom_range(0, 4) == 0;
      d = '{pc_plus4: $urandom(), instr: $urandom()};
      @(posedge clk); #1;
      if (flush) model = '0; else if (en) model = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
