// Single-cycle MIPS-lite datapath.
//
// Holds the PC and the register file and computes, within one clock cycle,
// everything an instruction needs; all state (PC, register file, data memory
// via dmem_we) changes together on the next rising clock edge.
//
//   fetch     pc goes out to instruction memory, instr comes back
//   operands  R[rs] and R[rt] from the register file; imm16 extended by sign
//             (ext_op = 1) or by zeros (ext_op = 0)
//   execute   ALU on R[rs] and either R[rt] or the immediate (alu_src)
//   memory    the ALU result is the data address, R[rt] the store data
//   write     ALU result or memory word (mem_to_reg) into rt or rd (reg_dst)
//   next PC   PC + 4, or PC + 4 + (sext(imm16) << 2) when branch and the ALU
//             zero flag are both 1
//
// PC + 4 and the branch target each have an adder of their own, so the ALU
// is free for the instruction itself. The instruction meanings and the list of
// components are the described ones; the exact mux placement is the usual
// single-cycle arrangement, chosen here. Interface: ctrl comes from the main
// control (combinational from instr); dmem_* connect to an asynchronous-read,
// synchronous-write data memory.
module datapath
  import mips_lite_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       ctrl,
  output logic [31:0] pc,
  input  logic [31:0] instr,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic        dmem_we,
  input  logic [31:0] dmem_rdata,
  output logic        alu_zero
);

  logic [31:0] pc_plus4, next_pc, branch_target;
  logic [31:0] imm_ext, imm_shifted;
  logic [31:0] busA, busB, busW, alu_b, alu_result;
  logic [4:0]  rw;
  logic        pc_src;
  logic        unused_carry4, unused_carry_br;

  pc_reg u_pc (
    .clk     (clk),
    .rst     (rst),
    .next_pc (next_pc),
    .pc      (pc)
  );

  add32 u_pc_adder (
    .A        (pc),
    .B        (32'd4),
    .CarryIn  (1'b0),
    .Sum      (pc_plus4),
    .CarryOut (unused_carry4)
  );

  extender u_ext (
    .in     (f_imm(instr)),
    .ext_op (ctrl.ext_op),
    .out    (imm_ext)
  );

  left_shift2 u_shift (
    .in  (imm_ext),
    .out (imm_shifted)
  );

  add32 u_branch_adder (
    .A        (pc_plus4),
    .B        (imm_shifted),
    .CarryIn  (1'b0),
    .Sum      (branch_target),
    .CarryOut (unused_carry_br)
  );

  mux32 #(.WIDTH(5)) u_rw_mux (
    .in0    (f_rt(instr)),
    .in1    (f_rd(instr)),
    .select (ctrl.reg_dst),
    .out    (rw)
  );

  regfile u_rf (
    .clk  (clk),
    .ra   (f_rs(instr)),
    .rb   (f_rt(instr)),
    .rw   (rw),
    .we   (ctrl.reg_wr & ~rst),
    .busW (busW),
    .busA (busA),
    .busB (busB)
  );

  mux32 u_alusrc_mux (
    .in0    (busB),
    .in1    (imm_ext),
    .select (ctrl.alu_src),
    .out    (alu_b)
  );

  alu u_alu (
    .A       (busA),
    .B       (alu_b),
    .control (ctrl.alu_ctrl),
    .zero    (alu_zero),
    .result  (alu_result)
  );

  mux32 u_wb_mux (
    .in0    (alu_result),
    .in1    (dmem_rdata),
    .select (ctrl.mem_to_reg),
    .out    (busW)
  );

  assign pc_src = ctrl.branch & alu_zero;

  mux32 u_pc_mux (
    .in0    (pc_plus4),
    .in1    (branch_target),
    .select (pc_src),
    .out    (next_pc)
  );

  assign dmem_addr  = alu_result;
  assign dmem_wdata = busB;
  assign dmem_we    = ctrl.mem_wr & ~rst;

endmodule
