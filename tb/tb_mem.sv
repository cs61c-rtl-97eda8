// Self-checking test of the idealized memory: synchronous writes, reads that
// follow the address without a clock edge, word selection by address bits
// 9:2 (low two bits and upper bits ignored), readD = 0 while RD = 0.
module tb_mem;
  logic        clk = 0, wr, rd;
  logic [31:0] addr, wd, rdata;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  mem dut (.CLK(clk), .WR(wr), .RD(rd), .address(addr), .writeD(wd), .readD(rdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd = 1; wr = 1;
    for (int i = 0; i < 256; i++) begin
      addr = 32'(i) << 2; wd = $urandom;
      @(negedge clk);
      model[i] = wd;
    end
    wr = 0;
    // asynchronous read: no clock edge between address change and check
    for (int i = 0; i < 256; i++) begin
      addr = {22'($urandom), 8'(i), 2'($urandom)};
      #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        $display("FAIL read word %0d = %h want %h", i, rdata, model[i]);
      end
    end
    // write needs WR and the edge
    repeat (300) begin
      int idx;
      idx = $urandom_range(255);
      wr = 1'($urandom); addr = 32'(idx) << 2; wd = $urandom;
      #1;
      checks++;
      if (rdata !== model[idx]) begin
        failures++;
        $display("FAIL word %0d changed before the edge", idx);
      end
      @(negedge clk);
      if (wr) model[idx] = wd;
      checks++;
      if (rdata !== model[idx]) begin
        failures++;
        $display("FAIL word %0d = %h after edge, want %h", idx, rdata, model[idx]);
      end
    end
    wr = 0; rd = 0; #1;
    checks++;
    if (rdata !== 32'h0) begin failures++; $display("FAIL readD=%h with RD=0", rdata); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
