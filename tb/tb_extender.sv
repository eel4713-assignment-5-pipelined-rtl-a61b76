// tb_extender: random immediates, both modes, against the arithmetic
// definition of sign and zero extension.
module tb_extender;
  logic [15:0] imm; logic zero_ext; logic [31:0] ext;
  int checks = 0, failures = 0;
  extender dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 1000; i++) begin
      int v;
      imm = 16'($urandom()); zero_ext = 1'($urandom_range(0, 1)); #1;
      v = zero_ext ? int'(imm) : int'($signed(imm));
      checks++;
      if (ext !== 32'(v)) begin failures++; $display("FAIL %h %b %h", imm, zero_ext, ext); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
