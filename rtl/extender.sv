// Immediate extender, 16 to 32 bits.
//
// ext_op = 1 copies bit 15 into bits 31:16 (sign extension, used by lw, sw
// and beq); ext_op = 0 fills them with zeros (zero extension, used by ori).
// Combinational. Sign extension is the described behaviour; the ext_op select
// that adds zero extension for ori is this design's way of serving both
// register transfers with one block.
module extender (
  input  logic [15:0] in,
  input  logic        ext_op,
  output logic [31:0] out
);

  always_comb begin
    out = {{16{ext_op & in[15]}}, in};
  end

endmodule
