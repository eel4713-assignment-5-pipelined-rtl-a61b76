// tb_reg_file: random writes and reads against a model. Checks that reset
// clears every register, that $0 stays zero, and that a value written on
// the falling edge is already visible on the read ports before the next
// rising edge (write-then-read in the same cycle).
module tb_reg_file;
  logic clk = 0, rst = 1, we = 0;
  logic [4:0] ra1 = 0, ra2 = 0, wa = 0, dbg_addr = 0;
  logic [31:0] rd1, rd2, wd = 0, dbg_data;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  reg_file dut (.*);
  always #5 clk = ~clk;
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(logic [31:0] got, logic [31:0] exp, string w);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s %h %h", w, got, exp); end
  endtask
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    foreach (model[i]) model[i] = 0;
    for (int r = 0; r < 32; r++) begin dbg_addr = 5'(r); #1; chk(dbg_data, 0, "reset"); end
    for (int i = 0; i < 500; i++) begin
      @(posedge clk); #1;                    // write-back data appears after the rising edge
      we = 1'($urandom_range(0, 1)); wa = 5'($urandom()); wd = $urandom();
      ra1 = 1'($urandom_range(0, 1)) ? wa : 5'($urandom()); ra2 = 5'($urandom());
      @(negedge clk); #1;                    // stored on the falling edge
      if (we && wa != 0) model[wa] = wd;
      chk(rd1, model[ra1], "rd1 same cycle"); chk(rd2, model[ra2], "rd2");
      dbg_addr = 5'($urandom()); #1; chk(dbg_data, model[dbg_addr], "dbg");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
