// Register file: NREGS registers of WIDTH bits (32 x 32 by default), two read
// ports and one write port, so an instruction can read rs and rt and write rt
// or rd in the same cycle.
//
// Reads are combinational: busA = R[ra], busB = R[rb]. The write of busW into
// R[rw] happens on the rising clock edge when we is 1, so a read of the
// register being written returns the old value until the edge. Register 0
// always reads 0 and ignores writes (the MIPS convention; this design's
// choice). There is no reset. The size is the described one; port names,
// timing and the zero register are this design's choices.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic [AW-1:0]    ra,
  input  logic [AW-1:0]    rb,
  input  logic [AW-1:0]    rw,
  input  logic             we,
  input  logic [WIDTH-1:0] busW,
  output logic [WIDTH-1:0] busA,
  output logic [WIDTH-1:0] busB
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (we && rw != '0) regs[rw] <= busW;
  end

  always_comb begin
    busA = (ra == '0) ? '0 : regs[ra];
    busB = (rb == '0) ? '0 : regs[rb];
  end

endmodule
