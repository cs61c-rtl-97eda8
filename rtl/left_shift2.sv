// Shift left by two: out = {in[29:0], 2'b00}.
//
// Combinational. Turns the sign-extended word offset of a branch into a byte
// offset before it is added to PC + 4.
module left_shift2 (
  input  logic [31:0] in,
  output logic [31:0] out
);

  always_comb begin
    out = {in[29:0], 2'b00};
  end

endmodule
