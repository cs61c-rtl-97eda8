// Self-checking test of the program counter: synchronous reset to 0, then a
// new value loaded on every rising edge and held between edges.
module tb_pc_reg;
  logic        clk = 0, rst;
  logic [31:0] nxt, pc, expect_pc;
  int checks = 0, failures = 0;

  pc_reg dut (.clk(clk), .rst(rst), .next_pc(nxt), .pc(pc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; nxt = 32'hdead_beef;
    @(posedge clk); #1;
    checks++;
    if (pc !== 32'h0) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst = 0;
    repeat (100) begin
      nxt = $urandom;
      expect_pc = nxt;
      @(posedge clk); #1;
      nxt = ~expect_pc;   // change input between edges: pc must hold
      #2;
      checks++;
      if (pc !== expect_pc) begin failures++; $display("FAIL pc=%h want %h", pc, expect_pc); end
    end
    rst = 1;
    @(posedge clk); #1;
    checks++;
    if (pc !== 32'h0) begin failures++; $display("FAIL second reset pc=%h", pc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
