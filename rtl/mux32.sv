// Two-to-one multiplexer: out = select ? in1 : in0.
//
// Combinational. The datapath uses it 32 bits wide to choose the ALU's second
// operand, the register write-back value and the next PC, and 5 bits wide to
// choose the destination register (rt or rd). The width parameter is this
// design's addition; the default is the 32 bits of the multiplexer symbol.
module mux32 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  input  logic             select,
  output logic [WIDTH-1:0] out
);

  always_comb begin
    if (select) out = in1;
    else        out = in0;
  end

endmodule
