// Idealized memory: MEM_WORDS words of 32 bits (256 by default).
//
// The word is selected by the byte address with its two low bits dropped,
// address[$clog2(MEM_WORDS)+1:2] (address[9:2] at 256 words); higher address
// bits are ignored, so the memory repeats through the address space. Reading
// is combinational: with RD = 1, readD shows the addressed word after the
// access time, independent of the clock. Writing is synchronous: with WR = 1,
// writeD is stored into the addressed word on the rising edge of CLK, which
// matters only for writes.
//
// Following the described memory: size, word selection, asynchronous read,
// synchronous write. This design's choices: readD is 0 while RD = 0 (rather
// than holding its last value), and there is no load-from-file or
// dump-to-file port; a simulation reaches the array memArray directly.
module mem #(
  parameter int unsigned MEM_WORDS = 256,
  localparam int unsigned IW       = $clog2(MEM_WORDS)
) (
  input  logic        CLK,
  input  logic        WR,
  input  logic        RD,
  input  logic [31:0] address,
  input  logic [31:0] writeD,
  output logic [31:0] readD
);

  logic [31:0]   memArray [MEM_WORDS];
  logic [IW-1:0] index;

  assign index = address[IW+1:2];

  always_ff @(posedge CLK) begin
    if (WR) memArray[index] <= writeD;
  end

  always_comb begin
    readD = RD ? memArray[index] : '0;
  end

endmodule
