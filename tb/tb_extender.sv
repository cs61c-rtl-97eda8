// Self-checking test of the immediate extender: sign and zero extension of
// corner and random 16-bit values.
module tb_extender;
  logic [15:0] imm;
  logic        sx;
  logic [31:0] o;
  int checks = 0, failures = 0;

  extender dut (.in(imm), .ext_op(sx), .out(o));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] v, input logic s);
    logic [31:0] want;
    imm = v; sx = s;
    #1;
    want = s ? 32'($signed(v)) : {16'h0, v};
    checks++;
    if (o !== want) begin
      failures++;
      $display("FAIL imm=%h sign=%b got %h want %h", v, s, o, want);
    end
  endtask

  initial begin
    check(16'h8000, 1'b1);
    check(16'hffff, 1'b1);
    check(16'hffff, 1'b0);
    check(16'h7fff, 1'b1);
    repeat (300) check(16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
