// 32-bit ALU of the MIPS-lite datapath.
//
// control selects the operation: 3'b000 A&B, 3'b001 A|B, 3'b010 A+B,
// 3'b110 A-B, 3'b111 set-on-less-than (signed). zero is 1 when the result is
// 0; after a subtract it is the A == B test that beq needs. Combinational.
//
// Set-on-less-than follows the described method rather than a plain compare of
// the difference: if A and B have the same sign the sign of A-B decides; if
// they differ, A < B exactly when A is negative. The operation codes are the
// described ones. The three unused codes (011, 100, 101) give 0, a choice of
// this design.
module alu
  import mips_lite_pkg::*;
(
  input  logic [31:0] A,
  input  logic [31:0] B,
  input  logic [2:0]  control,
  output logic        zero,
  output logic [31:0] result
);

  logic [31:0] diff;

  always_comb begin
    diff = A - B;
    unique case (control)
      ALU_AND: result = A & B;
      ALU_OR:  result = A | B;
      ALU_ADD: result = A + B;
      ALU_SUB: result = diff;
      ALU_SLT: result = {31'b0, (A[31] ^ B[31]) ? A[31] : diff[31]};
      default: result = '0;
    endcase
    zero = (result == '0);
  end

endmodule
