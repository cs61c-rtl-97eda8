// Self-checking test of the ALU: every operation code, random and corner
// operands, against results computed with SystemVerilog operators (signed
// compare for set-on-less-than), and the zero flag.
module tb_alu;
  logic [31:0] a, b, r;
  logic [2:0]  ctl;
  logic        z;
  int checks = 0, failures = 0;

  alu dut (.A(a), .B(b), .control(ctl), .zero(z), .result(r));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(logic [31:0] x, logic [31:0] y, logic [2:0] c);
    case (c)
      3'b000:  return x & y;
      3'b001:  return x | y;
      3'b010:  return x + y;
      3'b110:  return x - y;
      3'b111:  return ($signed(x) < $signed(y)) ? 32'd1 : 32'd0;
      default: return 32'd0;
    endcase
  endfunction

  task automatic check(input logic [31:0] x, input logic [31:0] y, input logic [2:0] c);
    logic [31:0] want;
    a = x; b = y; ctl = c;
    #1;
    want = model(x, y, c);
    checks++;
    if (r !== want || z !== (want == 0)) begin
      failures++;
      $display("FAIL ctl=%b A=%h B=%h got %h z=%b want %h", c, x, y, r, z, want);
    end
  endtask

  initial begin
    // slt corner cases: negative A with positive B, where A-B overflows
    check(32'h8000_0000, 32'h0000_0001, 3'b111);
    check(32'h7fff_ffff, 32'hffff_ffff, 3'b111);
    check(32'hffff_fffe, 32'hffff_ffff, 3'b111);
    check(32'h0000_0005, 32'h0000_0005, 3'b111);
    // equality through subtract / zero
    check(32'h1234_5678, 32'h1234_5678, 3'b110);
    check(32'h1234_5678, 32'h1234_5679, 3'b110);
    check(32'hffff_ffff, 32'h1, 3'b010);
    for (int c = 0; c < 8; c++)
      repeat (200) begin
        logic [31:0] x, y;
        x = $urandom; y = $urandom;
        if ($urandom_range(3) == 0) y = x;
        check(x, y, 3'(c));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
