// End-to-end test of the single-cycle MIPS-lite computer at its default size.
//
// Phase 1 loads a small program through the loader port: it fills an 8-word
// array with sw in a loop, sums it back with lw/addu in a second loop, stores
// the sum and a subu result, and parks in a beq-to-itself. Phase 2 loads a
// random program of the six instructions with forward branches. In both phases the reference model
// runs in lock step: the PC is compared every cycle (one instruction per
// cycle), and the register file and data memory are compared at the end.
// The bench also counts how often each instruction, taken and not-taken
// branches, loader writes and resets occurred, and fails if any never did.
module tb_mips_lite_computer;
  import mips_lite_ref_pkg::*;

  logic        clk = 0, rst, load_we;
  logic [31:0] load_addr, load_data, pc, instr;
  logic [31:0] prog [256];
  int checks = 0, failures = 0;
  int seen [K_NUM];
  int loads = 0, resets = 0;
  mips_lite_ref #(8) m;

  mips_lite_computer dut (.clk(clk), .rst(rst), .load_we(load_we), .load_addr(load_addr),
                          .load_data(load_data), .pc(pc), .instr(instr));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reset, load prog[0:n-1] through the loader port, start the model from
  // the memory and register contents the hardware holds
  task automatic load_and_reset(input int n);
    rst = 1; resets++;
    load_we = 0;
    @(negedge clk);
    for (int i = 0; i < n; i++) begin
      load_we = 1; load_addr = 32'(i * 4); load_data = prog[i];
      @(negedge clk);
      loads++;
    end
    load_we = 0;
    @(negedge clk);
    m = new();
    for (int i = 1; i < 32; i++) m.r[i] = dut.u_datapath.u_rf.regs[i];
    for (int i = 0; i < 256; i++) m.dmem[i] = dut.u_dmem.memArray[i];
    check(pc == 0, "pc after reset");
    rst = 0;
  endtask

  task automatic run(input int cycles, input string tag);
    for (int c = 0; c < cycles; c++) begin
      check(instr === prog[m.pc[9:2]], $sformatf("%s fetch at pc=%h", tag, m.pc));
      m.step(prog[m.pc[9:2]]);
      seen[m.kind]++;
      @(negedge clk);
      check(pc === m.pc, $sformatf("%s cycle %0d pc=%h want %h", tag, c, pc, m.pc));
    end
    for (int i = 1; i < 32; i++)
      check(dut.u_datapath.u_rf.regs[i] === m.r[i], $sformatf("%s R[%0d]", tag, i));
    for (int i = 0; i < 256; i++)
      check(dut.u_dmem.memArray[i] === m.dmem[i], $sformatf("%s MEM[%0d]", tag, i));
  endtask

  initial begin
    // ---- phase 1: array fill and sum ----
    foreach (prog[i]) prog[i] = beq(0, 0, -1);
    prog[0]  = ori(2, 0, 0);          // r2: byte offset
    prog[1]  = ori(3, 0, 16'h1234);   // r3: value to store
    prog[2]  = ori(4, 0, 4);          // r4: 4
    prog[3]  = ori(5, 0, 32);         // r5: end offset (8 words)
    prog[4]  = sw(3, 2, 16'h40);      // fill: MEM[0x40 + r2] = r3
    prog[5]  = addu(3, 3, 3);         //       r3 = 2 * r3
    prog[6]  = addu(2, 2, 4);         //       r2 += 4
    prog[7]  = beq(2, 5, 1);          //       done? -> 9
    prog[8]  = beq(0, 0, -5);         //       -> 4
    prog[9]  = ori(2, 0, 0);
    prog[10] = ori(6, 0, 0);          // r6: sum
    prog[11] = lw(7, 2, 16'h40);      // sum:  r7 = MEM[0x40 + r2]
    prog[12] = addu(6, 6, 7);         //       r6 += r7
    prog[13] = addu(2, 2, 4);
    prog[14] = beq(2, 5, 1);          //       done? -> 16
    prog[15] = beq(0, 0, -5);         //       -> 11
    prog[16] = sw(6, 0, 16'h80);      // MEM[0x80] = sum
    prog[17] = subu(8, 6, 3);         // r8 = sum - last r3
    prog[18] = sw(8, 0, 16'h84);
    prog[19] = beq(0, 0, -1);         // halt
    load_and_reset(20);
    run(90, "prog");
    // independent arithmetic: sum of 0x1234 * 2^k, k = 0..7, is 0x1234 * 255
    check(dut.u_dmem.memArray[32] === 32'h1234 * 255, "array sum");
    check(dut.u_dmem.memArray[33] === 32'h1234 * 255 - 32'h1234 * 256, "subu result");
    check(pc === 32'd76, "parked at halt");

    // ---- phase 2: random program ----
    foreach (prog[i]) begin
      int rs, rt, rd;
      rs = $urandom_range(7); rt = $urandom_range(7); rd = $urandom_range(7);
      case ($urandom_range(9))
        0: prog[i] = addu(rd, rs, rt);
        1: prog[i] = subu(rd, rs, rt);
        2, 3: prog[i] = ori(rt, rs, int'($urandom_range(16'hffff)));
        4: prog[i] = lw(rt, 0, int'($urandom_range(255)) * 4);
        5: prog[i] = sw(rt, 0, int'($urandom_range(255)) * 4);
        6: prog[i] = lw(rt, rs, int'($urandom_range(16'hffff)));
        7: prog[i] = sw(rt, rs, int'($urandom_range(16'hffff)));
        // forward branches only, so the program always moves on; the PC
        // wraps through the 256-word instruction memory
        8: prog[i] = beq(rs, rt, int'($urandom_range(8)));
        default: prog[i] = beq(rs, rs, int'($urandom_range(8)));
      endcase
    end
    load_and_reset(256);
    run(2000, "random");

    for (int k = 0; k < K_OTHER; k++)
      check(seen[k] > 0, $sformatf("event kind %0d never happened", k));
    check(loads > 0, "loader never used");
    check(resets > 1, "reset not repeated");
    $display("events: addu=%0d subu=%0d ori=%0d lw=%0d sw=%0d beq_taken=%0d beq_not_taken=%0d loads=%0d resets=%0d",
             seen[K_ADDU], seen[K_SUBU], seen[K_ORI], seen[K_LW], seen[K_SW],
             seen[K_BEQ_TAKEN], seen[K_BEQ_NOT_TAKEN], loads, resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
