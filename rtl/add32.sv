// Adder with carry in and carry out (32 bits by default).
//
// Sum = A + B + CarryIn; CarryOut is the carry out of the top bit. Purely
// combinational. The ports follow the adder symbol of the datapath building
// blocks (A, B, CarryIn, Sum, CarryOut, 32-bit buses); the single-cycle
// datapath uses two of them with CarryIn tied low, one for PC + 4 and one for
// the branch target. The WIDTH parameter is this design's addition.
module add32 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  input  logic             CarryIn,
  output logic [WIDTH-1:0] Sum,
  output logic             CarryOut
);

  always_comb begin
    {CarryOut, Sum} = {1'b0, A} + {1'b0, B} + {{WIDTH{1'b0}}, CarryIn};
  end

endmodule
