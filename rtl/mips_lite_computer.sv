// Single-cycle MIPS-lite computer: processor (control + datapath), an
// instruction memory and a data memory.
//
// Every rising clock edge completes one instruction of the subset addu, subu,
// ori, lw, sw, beq. The PC addresses the instruction memory, whose read is
// combinational; the main control decodes the instruction into control points
// for the datapath; the data memory is read combinationally for lw and written
// on the clock edge for sw. So the machine runs at one instruction per cycle
// (CPI = 1), and its clock period must cover the longest path, a lw:
// instruction fetch, register read, address add, data read, register set-up.
//
// Programs are placed through the loader port: while rst is high, load_we
// writes load_data into the instruction word at byte address load_addr. While
// rst is high the PC is held at 0 and no register or data memory write
// happens. The two memories are separate because one instruction both fetches
// and may load or store in the same cycle. The memory size (MEM_WORDS words of
// 32 bits each) is the described one; the loader port, the reset and the
// separate memories are this design's choices.
module mips_lite_computer
  import mips_lite_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  output logic [31:0] pc,
  output logic [31:0] instr
);

  ctrl_t       ctrl;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata;
  logic        dmem_we;
  logic [31:0] imem_addr;

  // The loader owns the instruction memory address while it writes.
  assign imem_addr = (rst && load_we) ? load_addr : pc;

  mem #(.MEM_WORDS(MEM_WORDS)) u_imem (
    .CLK     (clk),
    .WR      (rst & load_we),
    .RD      (1'b1),
    .address (imem_addr),
    .writeD  (load_data),
    .readD   (instr)
  );

  control u_control (
    .op    (f_op(instr)),
    .funct (f_funct(instr)),
    .ctrl  (ctrl)
  );

  datapath u_datapath (
    .clk        (clk),
    .rst        (rst),
    .ctrl       (ctrl),
    .pc         (pc),
    .instr      (instr),
    .dmem_addr  (dmem_addr),
    .dmem_wdata (dmem_wdata),
    .dmem_we    (dmem_we),
    .dmem_rdata (dmem_rdata),
    .alu_zero   ()
  );

  mem #(.MEM_WORDS(MEM_WORDS)) u_dmem (
    .CLK     (clk),
    .WR      (dmem_we),
    .RD      (ctrl.mem_to_reg),
    .address (dmem_addr),
    .writeD  (dmem_wdata),
    .readD   (dmem_rdata)
  );

endmodule
