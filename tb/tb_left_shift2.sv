// Self-checking test of the shift-left-by-two block against multiply by 4.
module tb_left_shift2;
  logic [31:0] i, o;
  int checks = 0, failures = 0;

  left_shift2 dut (.in(i), .out(o));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300) begin
      i = $urandom;
      #1;
      checks++;
      if (o !== i * 32'd4) begin
        failures++;
        $display("FAIL in=%h out=%h", i, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
