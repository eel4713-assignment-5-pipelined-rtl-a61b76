// tb_hazard_unit: random cases against the load-use rule: stall only when
// the instruction in EX is a load whose destination (not $0) is a register
// the instruction in ID really reads.
module tb_hazard_unit;
  logic [4:0] id_rs, id_rt, ex_rd; logic id_uses_rs, id_uses_rt, ex_memread, stall;
  int checks = 0, failures = 0;
  hazard_unit dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      bit e;
      id_rs = 5'($urandom_range(0, 3)); id_rt = 5'($urandom_range(0, 3)); ex_rd = 5'($urandom_range(0, 3));
      id_uses_rs = 1'($urandom_range(0, 1)); id_uses_rt = 1'($urandom_range(0, 1)); ex_memread = 1'($urandom_range(0, 1));
      #1;
      e = 0;
      if (ex_memread && ex_rd != 0) begin
        if (id_uses_rs && id_rs == ex_rd) e = 1;
        if (id_uses_rt && id_rt == ex_rd) e = 1;
      end
      checks++;
      if (stall !== e) begin failures++; $display("FAIL"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
