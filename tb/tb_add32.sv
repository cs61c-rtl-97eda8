// Self-checking test of the adder: random and corner operands, with and
// without carry in, against a 33-bit reference sum.
module tb_add32;
  logic [31:0] a, b, s;
  logic        ci, co;
  int checks = 0, failures = 0;

  add32 dut (.A(a), .B(b), .CarryIn(ci), .Sum(s), .CarryOut(co));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [32:0] ref_sum;
    a = x; b = y; ci = c;
    #1;
    ref_sum = 33'(x) + 33'(y) + 33'(c);
    checks++;
    if ({co, s} !== ref_sum) begin
      failures++;
      $display("FAIL %h + %h + %b: got %b_%h want %h", x, y, c, co, s, ref_sum);
    end
  endtask

  initial begin
    check(32'hffff_ffff, 32'h0000_0001, 1'b0);
    check(32'hffff_ffff, 32'hffff_ffff, 1'b1);
    check(32'h0, 32'h0, 1'b1);
    check(32'h7fff_ffff, 32'h1, 1'b0);
    repeat (500) check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
