// hazard_unit: load-use hazard detection.
//
// A load's data is only available at the end of MEM, so an instruction that
// reads the loaded register directly behind the load cannot get it by
// forwarding. When the instruction in EX is a load whose destination is a
// register the instruction in ID actually reads, stall is raised for one
// cycle: the PC and IF/ID hold, and a nop (all-zero control word) enters
// ID/EX. One cycle later the load is in MEM/WB and its data is forwarded.
// All other hazards (ALU results, lui, jal's link, jr and branch operands)
// are served by forwarding, because jr and branches use their operands in EX.
// Combinational.
module hazard_unit (
  input  logic [4:0] id_rs,
  input  logic [4:0] id_rt,
  input  logic       id_uses_rs,
  input  logic       id_uses_rt,
  input  logic       ex_memread,
  input  logic [4:0] ex_rd,
  output logic       stall
);
  assign stall = ex_memread && ex_rd != 5'd0 &&
                 ((id_uses_rs && ex_rd == id_rs) || (id_uses_rt && ex_rd == id_rt));
endmodule
