// tb_pc_unit: checks reset to 0, loading pc_next when enabled, holding when
// en is low (stall) and the PC+4 incrementer, against a software model.
module tb_pc_unit;
  logic clk = 0, rst = 1, en = 0;
  logic [31:0] pc_next = 0, pc, pc_plus4, model;
  int checks = 0, failures = 0;
  pc_unit dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(logic [31:0] got, logic [31:0] exp, string w);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s %h %h", w, got, exp); end
  endtask
  initial begin
    pc_next = 32'h1234_5678; en = 1;
    @(posedge clk); #1; chk(pc, 0, "reset");
    rst = 0; model = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      chk(pc, model, "pc"); chk(pc_plus4, model + 4, "pc+4");
      en = ($urandom_range(0, 3) != 0); pc_next = $urandom();
      @(posedge clk); if (en) model = pc_next;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
