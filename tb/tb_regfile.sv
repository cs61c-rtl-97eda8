// Self-checking test of the register file: random writes and two-port reads
// against a reference array, register 0 stays 0, writes take effect only on
// the clock edge and only with the write enable.
module tb_regfile;
  logic        clk = 0, we;
  logic [4:0]  ra, rb, rw;
  logic [31:0] busW, busA, busB;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk(clk), .ra(ra), .rb(rb), .rw(rw), .we(we), .busW(busW), .busA(busA), .busB(busB));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    ra = 5'($urandom); rb = 5'($urandom);
    #1;
    checks++;
    if (busA !== model[ra] || busB !== model[rb]) begin
      failures++;
      $display("FAIL R[%0d]=%h (want %h) R[%0d]=%h (want %h)", ra, busA, model[ra], rb, busB, model[rb]);
    end
  endtask

  initial begin
    // fill every register
    we = 1;
    for (int i = 0; i < 32; i++) begin
      rw = 5'(i); busW = $urandom;
      @(negedge clk);
      model[i] = (i == 0) ? 32'h0 : busW;
    end
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(31 - i); #1;
      checks++;
      if (busA !== model[i] || busB !== model[31 - i]) begin
        failures++;
        $display("FAIL fill R[%0d]=%h want %h", i, busA, model[i]);
      end
    end
    // random traffic; the read before the edge must show the old value
    repeat (500) begin
      we = 1'($urandom); rw = 5'($urandom); busW = $urandom;
      ra = rw; rb = 5'($urandom);
      #1;
      checks++;
      if (busA !== model[rw]) begin
        failures++;
        $display("FAIL write-through R[%0d]=%h before edge, want %h", rw, busA, model[rw]);
      end
      @(negedge clk);
      if (we && rw != 0) model[rw] = busW;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
