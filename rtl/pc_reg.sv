// Program counter: a 32-bit register loaded with next_pc on every rising
// clock edge, so the single-cycle machine starts a new instruction each cycle.
// rst (synchronous, active high) sets it to 0; the reset value and reset style
// are this design's choice.
module pc_reg (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] next_pc,
  output logic [31:0] pc
);

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= next_pc;
  end

endmodule
