// Self-checking test of the 2-to-1 multiplexer with random inputs.
module tb_mux32;
  logic [31:0] i0, i1, o;
  logic        sel;
  int checks = 0, failures = 0;

  mux32 dut (.in0(i0), .in1(i1), .select(sel), .out(o));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400) begin
      i0 = $urandom; i1 = $urandom; sel = 1'($urandom);
      #1;
      checks++;
      if (o !== (sel ? i1 : i0)) begin
        failures++;
        $display("FAIL sel=%b in0=%h in1=%h out=%h", sel, i0, i1, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
