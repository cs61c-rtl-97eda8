// Self-checking test of the single-cycle datapath, driven by the main control.
//
// Each cycle the bench offers a random instruction of the subset (plus some
// unknown encodings) and runs the same instruction on the reference model. It
// checks the PC every cycle, the data memory write request every cycle, the
// load data path through a bench-side data memory, and the whole register file
// at the end. Every instruction completes in exactly one cycle.
module tb_datapath;
  import mips_lite_pkg::*;
  import mips_lite_ref_pkg::*;

  logic        clk = 0, rst;
  ctrl_t       ctrl;
  logic [31:0] pc, instr, daddr, dwdata, drdata;
  logic        dwe, zero;
  logic [31:0] bench_dmem [256];
  int checks = 0, failures = 0;
  int seen [K_NUM];
  mips_lite_ref #(8) m;

  control  u_ctl (.op(instr[31:26]), .funct(instr[5:0]), .ctrl(ctrl));
  datapath dut (.clk(clk), .rst(rst), .ctrl(ctrl), .pc(pc), .instr(instr),
                .dmem_addr(daddr), .dmem_wdata(dwdata), .dmem_we(dwe),
                .dmem_rdata(drdata), .alu_zero(zero));

  // bench data memory: combinational read, write on the edge
  assign drdata = bench_dmem[daddr[9:2]];
  always @(posedge clk) if (dwe) bench_dmem[daddr[9:2]] <= dwdata;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rand_instr();
    int rs, rt, rd;
    rs = $urandom_range(7); rt = $urandom_range(7); rd = $urandom_range(7);
    case ($urandom_range(9))
      0: return addu(rd, rs, rt);
      1: return subu(rd, rs, rt);
      2, 3: return ori(rt, rs, int'($urandom_range(16'hffff)));
      4: return lw(rt, 0, int'($urandom_range(255)) * 4);
      5: return sw(rt, rs, int'($urandom_range(63)) * 4 - 64);
      6: return beq(rs, rt, int'($urandom_range(40)) - 20);
      7: return beq(rs, rs, int'($urandom_range(40)) - 20);
      8: return lw(rt, rs, int'($urandom_range(16'hffff)));
      default: return $urandom;   // mostly unknown encodings
    endcase
  endfunction

  initial begin
    m = new();
    foreach (bench_dmem[i]) begin bench_dmem[i] = $urandom; m.dmem[i] = bench_dmem[i]; end
    instr = 32'hffff_ffff;  // unknown opcode during reset
    rst = 1;
    @(negedge clk);
    // registers are not reset: set them through the datapath first
    rst = 0;
    for (int i = 1; i < 32; i++) begin
      instr = ori(i, 0, i * 3);
      m.step(instr);
      @(negedge clk);
    end
    repeat (3000) begin
      instr = rand_instr();
      m.step(instr);
      seen[m.kind]++;
      #1;
      checks++;
      if (dwe !== m.st_en || (m.st_en && (daddr !== m.st_addr || dwdata !== m.st_data))) begin
        failures++;
        $display("FAIL store %h: we=%b addr=%h data=%h want %b %h %h", instr, dwe, daddr, dwdata,
                 m.st_en, m.st_addr, m.st_data);
      end
      @(negedge clk);
      checks++;
      if (pc !== m.pc) begin
        failures++;
        $display("FAIL %h: pc=%h want %h", instr, pc, m.pc);
      end
    end
    for (int i = 0; i < 32; i++) begin
      checks++;
      if ((i == 0 ? 32'h0 : dut.u_rf.regs[i]) !== m.r[i]) begin
        failures++;
        $display("FAIL R[%0d]=%h want %h", i, dut.u_rf.regs[i], m.r[i]);
      end
    end
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (bench_dmem[i] !== m.dmem[i]) begin failures++; $display("FAIL MEM[%0d]", i); end
    end
    for (int k = 0; k < K_NUM; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL kind %0d never ran", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
