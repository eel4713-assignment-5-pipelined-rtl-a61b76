// tb_alu: every ALU function with random and corner operands against a
// model written with integer arithmetic; checks result, zero flag and
// overflow (only signed add/sub may raise it).
module tb_alu;
  import mips_pkg::*;
  logic [31:0] a, b, y; logic [4:0] shamt; alufn_t fn; logic zero, overflow;
  int checks = 0, failures = 0;
  alu dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [31:0] pick();
    case ($urandom_range(0, 5))
      0: return 32'h7FFF_FFFF; 1: return 32'h8000_0000; 2: return 32'hFFFF_FFFF; 3: return 0;
      default: return $urandom();
    endcase
  endfunction
  initial begin
    for (int i = 0; i < 4000; i++) begin
      longint sa, sb, s; logic [31:0] e; logic eo;
      a = pick(); b = pick(); shamt = 5'($urandom()); fn = alufn_t'($urandom_range(0, 11)); #1;
      sa = longint'($signed(a)); sb = longint'($signed(b)); eo = 0;
      case (fn)
        ALU_ADD:  begin s = sa + sb; e = 32'(s); eo = (s > 64'sd2147483647 || s < -64'sd2147483648); end
        ALU_ADDU: e = 32'(longint'(a) + longint'(b));
        ALU_SUB:  begin s = sa - sb; e = 32'(s); eo = (s > 64'sd2147483647 || s < -64'sd2147483648); end
        ALU_SUBU: e = 32'(longint'(a) - longint'(b));
        ALU_AND:  e = a & b;
        ALU_OR:   e = a | b;
        ALU_NOR:  e = ~(a | b);
        ALU_SLT:  e = (sa < sb) ? 1 : 0;
        ALU_SLTU: e = (longint'(a) < longint'(b)) ? 1 : 0;
        ALU_SLL:  e = 32'(longint'(b) * (64'd1 << shamt));
        ALU_SRL:  e = 32'(longint'(b) / (64'd1 << shamt));
        default:  e = {b[15:0], 16'h0};
      endcase
      checks += 3;
      if (y !== e) begin failures++; $display("FAIL %s %h %h -> %h exp %h", fn.name(), a, b, y, e); end
      if (zero !== (e == 0)) failures++;
      if (overflow !== eo) begin failures++; $display("FAIL ovf %s %h %h", fn.name(), a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
