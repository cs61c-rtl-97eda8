// Main control of the single-cycle MIPS-lite processor.
//
// Decodes op (instruction bits 31:26) and, for R-type instructions, funct
// (bits 5:0) into the datapath control points. Combinational: the control
// points are valid in the same cycle as the instruction. The settings come
// from the register transfer of each instruction:
//
//   addu/subu  R[rd] = R[rs] +/- R[rt]          rd, register B, ALU add/sub
//   ori        R[rt] = R[rs] | zero_ext(imm16)  rt, immediate (zero ext), OR
//   lw         R[rt] = MEM[R[rs] + sext(imm16)] rt, immediate (sign ext), add, memory data
//   sw         MEM[R[rs] + sext(imm16)] = R[rt] memory write, add
//   beq        branch if R[rs] - R[rt] == 0     subtract, branch
//
// Any other encoding writes nothing and falls through to PC + 4. The names of
// the control points, the opcode numbers and this decode table are this
// design's own; the instruction meanings are the described ones.
module control
  import mips_lite_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '{reg_dst: 1'b0, alu_src: 1'b0, mem_to_reg: 1'b0, reg_wr: 1'b0,
             mem_wr: 1'b0, branch: 1'b0, ext_op: 1'b0, alu_ctrl: ALU_ADD};
    unique case (op)
      OP_RTYPE: begin
        ctrl.reg_dst = 1'b1;
        if (funct == FN_ADDU) begin
          ctrl.reg_wr   = 1'b1;
          ctrl.alu_ctrl = ALU_ADD;
        end else if (funct == FN_SUBU) begin
          ctrl.reg_wr   = 1'b1;
          ctrl.alu_ctrl = ALU_SUB;
        end
      end
      OP_ORI: begin
        ctrl.alu_src  = 1'b1;
        ctrl.reg_wr   = 1'b1;
        ctrl.ext_op   = 1'b0;
        ctrl.alu_ctrl = ALU_OR;
      end
      OP_LW: begin
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_wr     = 1'b1;
        ctrl.ext_op     = 1'b1;
        ctrl.alu_ctrl   = ALU_ADD;
      end
      OP_SW: begin
        ctrl.alu_src  = 1'b1;
        ctrl.mem_wr   = 1'b1;
        ctrl.ext_op   = 1'b1;
        ctrl.alu_ctrl = ALU_ADD;
      end
      OP_BEQ: begin
        ctrl.branch   = 1'b1;
        ctrl.ext_op   = 1'b1;
        ctrl.alu_ctrl = ALU_SUB;
      end
      default: ;
    endcase
  end

endmodule
