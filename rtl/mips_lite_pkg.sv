// Shared types and constants of the single-cycle MIPS-lite processor.
//
// The instruction subset is addu, subu, ori, lw, sw and beq. The field layout
// (op 31:26, rs 25:21, rt 20:16, rd 15:11, shamt 10:6, funct 5:0, imm16 15:0)
// is the MIPS one. The opcode and funct numbers are the standard MIPS
// encodings; they are this design's choice of numbering, as is the grouping
// of the control points into one struct.
package mips_lite_pkg;

  // Major opcodes (instruction bits 31:26).
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_ORI   = 6'h0d;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2b;
  localparam logic [5:0] OP_BEQ   = 6'h04;

  // R-type function codes (instruction bits 5:0).
  localparam logic [5:0] FN_ADDU  = 6'h21;
  localparam logic [5:0] FN_SUBU  = 6'h23;

  // ALU operation select; the code points are those of the ALU description.
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_ctrl_e;

  // Control points of the datapath, driven by the main control each cycle.
  typedef struct packed {
    logic      reg_dst;   // 1: write register is rd, 0: rt
    logic      alu_src;   // 1: ALU B input is the extended immediate, 0: R[rt]
    logic      mem_to_reg;// 1: write-back data is the data memory word, 0: ALU result
    logic      reg_wr;    // register file write enable
    logic      mem_wr;    // data memory write enable
    logic      branch;    // beq: take the branch target when the ALU result is zero
    logic      ext_op;    // 1: sign extend imm16, 0: zero extend
    alu_ctrl_e alu_ctrl;  // ALU operation
  } ctrl_t;

  // Instruction field helpers.
  function automatic logic [5:0]  f_op   (logic [31:0] i); return i[31:26]; endfunction
  function automatic logic [4:0]  f_rs   (logic [31:0] i); return i[25:21]; endfunction
  function automatic logic [4:0]  f_rt   (logic [31:0] i); return i[20:16]; endfunction
  function automatic logic [4:0]  f_rd   (logic [31:0] i); return i[15:11]; endfunction
  function automatic logic [5:0]  f_funct(logic [31:0] i); return i[5:0];   endfunction
  function automatic logic [15:0] f_imm  (logic [31:0] i); return i[15:0];  endfunction

endpackage
