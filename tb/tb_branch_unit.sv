// tb_branch_unit: random branch/jump situations against the next-PC rule:
// a taken beq/bne goes to the branch target, else a j/jal/jr to the jump
// target, else PC+4; redirect is set exactly when the PC is not sequential.
module tb_branch_unit;
  logic [31:0] pc_plus4, mem_jump_target, mem_branch_target, pc_next;
  logic mem_branch, mem_bne, mem_zero, mem_jump, redirect;
  int checks = 0, failures = 0;
  branch_unit dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] e; bit r;
      pc_plus4 = $urandom(); mem_jump_target = $urandom(); mem_branch_target = $urandom();
      mem_bne = 1'($urandom_range(0, 1)); mem_zero = 1'($urandom_range(0, 1));
      case ($urandom_range(0, 2))
        0: begin mem_branch = 1; mem_jump = 0; end
        1: begin mem_branch = 0; mem_jump = 1; end
        default: begin mem_branch = 0; mem_jump = 0; end
      endcase
      #1;
      e = pc_plus4; r = 0;
      if (mem_jump) begin e = mem_jump_target; r = 1; end
      if (mem_branch && (mem_bne ^ mem_zero)) begin e = mem_branch_target; r = 1; end
      checks += 2;
      if (pc_next !== e) begin failures++; $display("FAIL pc"); end
      if (redirect !== r) begin failures++; $display("FAIL redirect"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
