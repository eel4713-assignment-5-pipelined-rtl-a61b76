// tb_forwarding_unit: random register numbers drawn from a small set (so
// that matches are frequent) against the forwarding rules: EX/MEM (code 2)
// before MEM/WB (code 1), never from a non-writing producer or from $0.
module tb_forwarding_unit;
  logic [4:0] ex_rs, ex_rt, mem_rd, wb_rd; logic mem_regwrite, wb_regwrite;
  logic [1:0] sel_a, sel_b;
  int checks = 0, failures = 0;
  forwarding_unit dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [1:0] m(logic [4:0] s);
    logic [1:0] r = 0;
    if (wb_regwrite && wb_rd == s && s != 0) r = 1;
    if (mem_regwrite && mem_rd == s && s != 0) r = 2;
    return r;
  endfunction
  initial begin
    for (int i = 0; i < 2000; i++) begin
      ex_rs = 5'($urandom_range(0, 3)); ex_rt = 5'($urandom_range(0, 3));
      mem_rd = 5'($urandom_range(0, 3)); wb_rd = 5'($urandom_range(0, 3));
      mem_regwrite = 1'($urandom_range(0, 1)); wb_regwrite = 1'($urandom_range(0, 1)); #1;
      checks += 2;
      if (sel_a !== m(ex_rs)) begin failures++; $display("FAIL a"); end
      if (sel_b !== m(ex_rt)) begin failures++; $display("FAIL b"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
