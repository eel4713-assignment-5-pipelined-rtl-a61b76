// mips_pipeline: five-stage pipelined MIPS processor.
//
// Stages and where each decision is made:
//   IF   PC, PC+4 incrementer, instruction memory.
//   ID   register file (written on the falling edge), main decoder,
//        immediate extender, and the jump mux that forms the j/jal target
//        {PC+4[31:28], instr[25:0], 00}.
//   EX   two four-input forwarding muxes in front of the ALU, the ALU-source
//        mux, ALU control and ALU, the branch-target adder, the JR mux (jr
//        replaces the jump target with the forwarded rs value) and the
//        destination mux (rt, rd, or $31 for jal). For jal the EX result is
//        PC+4, so the link value forwards like any ALU result.
//   MEM  branch logic and branch mux (next PC), memory decoding unit, data
//        memory.
//   WB   the memory-to-register mux; the register file writes its output on
//        the following falling edge.
// Hazards: results are forwarded from EX/MEM and MEM/WB into EX; a load
// followed directly by a reader of the loaded register stalls one cycle
// (PC and IF/ID hold, a bubble enters ID/EX). Every change of control flow
// (taken beq/bne, j, jal, jr) takes effect when the instruction reaches MEM;
// the three younger instructions are then flushed, so there are no delay
// slots and a taken transfer costs three cycles. Choosing to flush rather
// than to execute delay slots, the 256-word memories, the load ports and the
// asynchronous memory reads are this design's choices; the stage contents
// and the forwarding/stalling scheme follow the original processor.
//
// Interface: imem_* writes one instruction word per cycle and dmem_* one data
// word (dmem writes take priority over the pipeline's own access), both meant
// to be used while rst is high. dbg_* read a register and a data-memory word.
// overflow is high for the cycle in which a signed add, addi or sub in EX
// overflows (not for an instruction being flushed); the result is still
// written.
module mips_pipeline
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256,
  localparam int unsigned IAW = $clog2(IMEM_WORDS),
  localparam int unsigned DAW = $clog2(DMEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           imem_we,
  input  logic [IAW-1:0] imem_waddr,
  input  logic [31:0]    imem_wdata,
  input  logic           dmem_we,
  input  logic [DAW-1:0] dmem_waddr,
  input  logic [31:0]    dmem_wdata,
  input  logic [4:0]     dbg_reg_addr,
  output logic [31:0]    dbg_reg_data,
  input  logic [DAW-1:0] dbg_dmem_addr,
  output logic [31:0]    dbg_dmem_data,
  output logic [31:0]    pc,
  output logic           overflow
);
  // ---------------------------------------------------------------- hazards
  logic stall, redirect;

  // ---------------------------------------------------------------- IF
  logic [31:0] pc_plus4, pc_next, if_instr;
  if_id_t      if_d, ifid;

  pc_unit u_pc (
    .clk, .rst,
    .en       (!stall || redirect),
    .pc_next  (pc_next),
    .pc       (pc),
    .pc_plus4 (pc_plus4)
  );

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk,
    .addr  (pc),
    .instr (if_instr),
    .we    (imem_we),
    .waddr (imem_waddr),
    .wdata (imem_wdata)
  );

  assign if_d = '{pc_plus4: pc_plus4, instr: if_instr};

  pipe_reg #(.T(if_id_t)) u_ifid (
    .clk, .rst, .en(!stall), .flush(redirect), .d(if_d), .q(ifid)
  );

  // ---------------------------------------------------------------- ID
  ctrl_t       id_ctrl;
  logic [31:0] id_rs_data, id_rt_data, id_imm;
  logic [4:0]  id_rs, id_rt;
  id_ex_t      id_d, idex;
  mem_wb_t     memwb;
  logic [31:0] wb_data;

  assign id_rs = ifid.instr[25:21];
  assign id_rt = ifid.instr[20:16];

  control u_ctrl (
    .opcode (ifid.instr[31:26]),
    .funct  (ifid.instr[5:0]),
    .ctrl   (id_ctrl)
  );

  reg_file u_rf (
    .clk, .rst,
    .ra1      (id_rs),
    .ra2      (id_rt),
    .rd1      (id_rs_data),
    .rd2      (id_rt_data),
    .we       (memwb.ctrl.reg_write),
    .wa       (memwb.dest),
    .wd       (wb_data),
    .dbg_addr (dbg_reg_addr),
    .dbg_data (dbg_reg_data)
  );

  extender u_ext (
    .imm      (ifid.instr[15:0]),
    .zero_ext (id_ctrl.zero_ext),
    .ext      (id_imm)
  );

  hazard_unit u_hz (
    .id_rs      (id_rs),
    .id_rt      (id_rt),
    .id_uses_rs (id_ctrl.uses_rs),
    .id_uses_rt (id_ctrl.uses_rt),
    .ex_memread (idex.ctrl.mem_read),
    .ex_rd      (idex.rt),
    .stall      (stall)
  );

  always_comb begin
    id_d             = '0;
    id_d.ctrl        = id_ctrl;
    id_d.pc_plus4    = ifid.pc_plus4;
    // jump mux: j/jal target, otherwise the sequential address
    id_d.jump_target = id_ctrl.jump ? {ifid.pc_plus4[31:28], ifid.instr[25:0], 2'b00}
                                    : ifid.pc_plus4;
    id_d.rs_data     = id_rs_data;
    id_d.rt_data     = id_rt_data;
    id_d.imm         = id_imm;
    id_d.rs          = id_rs;
    id_d.rt          = id_rt;
    id_d.rd          = ifid.instr[15:11];
    id_d.shamt       = ifid.instr[10:6];
    id_d.funct       = ifid.instr[5:0];
  end

  pipe_reg #(.T(id_ex_t)) u_idex (
    .clk, .rst, .en(1'b1), .flush(stall || redirect), .d(id_d), .q(idex)
  );

  // ---------------------------------------------------------------- EX
  ex_mem_t     ex_d, exmem;
  logic [1:0]  sel_a, sel_b;
  logic [31:0] fwd_a, fwd_b, alu_b, alu_y;
  logic        alu_zero, alu_ovf;
  alufn_t      alu_fn;

  forwarding_unit u_fwd (
    .ex_rs        (idex.rs),
    .ex_rt        (idex.rt),
    .mem_rd       (exmem.dest),
    .mem_regwrite (exmem.ctrl.reg_write),
    .wb_rd        (memwb.dest),
    .wb_regwrite  (memwb.ctrl.reg_write),
    .sel_a        (sel_a),
    .sel_b        (sel_b)
  );

  always_comb begin
    unique case (sel_a)
      2'd0:    fwd_a = idex.rs_data;
      2'd1:    fwd_a = wb_data;
      2'd2:    fwd_a = exmem.result;
      default: fwd_a = 32'h0;
    endcase
    unique case (sel_b)
      2'd0:    fwd_b = idex.rt_data;
      2'd1:    fwd_b = wb_data;
      2'd2:    fwd_b = exmem.result;
      default: fwd_b = 32'h0;
    endcase
  end

  assign alu_b = idex.ctrl.alu_src ? idex.imm : fwd_b;

  alu_control u_aluc (
    .alu_op (idex.ctrl.alu_op),
    .funct  (idex.funct),
    .alu_fn (alu_fn)
  );

  alu u_alu (
    .a        (fwd_a),
    .b        (alu_b),
    .shamt    (idex.shamt),
    .fn       (alu_fn),
    .y        (alu_y),
    .zero     (alu_zero),
    .overflow (alu_ovf)
  );

  // an instruction in EX that is being flushed does not report overflow
  assign overflow = alu_ovf && !redirect;

  always_comb begin
    ex_d               = '0;
    ex_d.ctrl          = idex.ctrl;
    ex_d.branch_target = idex.pc_plus4 + {idex.imm[29:0], 2'b00};
    // JR mux
    ex_d.jump_target   = idex.ctrl.jr ? fwd_a : idex.jump_target;
    ex_d.zero          = alu_zero;
    ex_d.result        = idex.ctrl.link ? idex.pc_plus4 : alu_y;
    ex_d.store_data    = fwd_b;
    // destination mux
    ex_d.dest          = idex.ctrl.link    ? 5'd31 :
                         idex.ctrl.reg_dst ? idex.rd : idex.rt;
  end

  pipe_reg #(.T(ex_mem_t)) u_exmem (
    .clk, .rst, .en(1'b1), .flush(redirect), .d(ex_d), .q(exmem)
  );

  // ---------------------------------------------------------------- MEM
  logic [3:0]  mem_be;
  logic [31:0] mem_wdata, mem_q, mem_load;
  mem_wb_t     mem_d;

  branch_unit u_br (
    .pc_plus4          (pc_plus4),
    .mem_branch        (exmem.ctrl.branch),
    .mem_bne           (exmem.ctrl.bne),
    .mem_zero          (exmem.zero),
    .mem_jump          (exmem.ctrl.jump || exmem.ctrl.jr),
    .mem_jump_target   (exmem.jump_target),
    .mem_branch_target (exmem.branch_target),
    .pc_next           (pc_next),
    .redirect          (redirect)
  );

  mem_decoder u_mdec (
    .addr       (exmem.result),
    .size       (exmem.ctrl.mem_size),
    .store_data (exmem.store_data),
    .mem_q      (mem_q),
    .byte_en    (mem_be),
    .wdata      (mem_wdata),
    .load_data  (mem_load)
  );

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk,
    .addr     (dmem_we ? dmem_waddr : exmem.result[DAW+1:2]),
    .byteena  (dmem_we ? 4'hF : mem_be),
    .data     (dmem_we ? dmem_wdata : mem_wdata),
    .wren     (dmem_we || exmem.ctrl.mem_write),
    .q        (mem_q),
    .dbg_addr (dbg_dmem_addr),
    .dbg_q    (dbg_dmem_data)
  );

  assign mem_d = '{ctrl: exmem.ctrl, result: exmem.result,
                   load_data: mem_load, dest: exmem.dest};

  pipe_reg #(.T(mem_wb_t)) u_memwb (
    .clk, .rst, .en(1'b1), .flush(1'b0), .d(mem_d), .q(memwb)
  );

  // ---------------------------------------------------------------- WB
  assign wb_data = memwb.ctrl.mem_to_reg ? memwb.load_data : memwb.result;

  // ---------------------------------------------------------------- rules
  // a stall without a redirect holds the fetch address and IF/ID
  a_stall_holds: assert property (@(posedge clk) disable iff (rst)
    stall && !redirect |=> $stable(pc) && $stable(ifid));
  // a redirect leaves bubbles in ID/EX and EX/MEM
  a_flush_bubbles: assert property (@(posedge clk) disable iff (rst)
    redirect |=> idex == '0 && exmem == '0);
  // a bubble never writes memory or a register
  a_bubble_quiet: assert property (@(posedge clk) disable iff (rst)
    idex.ctrl == '0 |-> !idex.ctrl.mem_write && !idex.ctrl.reg_write);

endmodule
