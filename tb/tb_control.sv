// Self-checking test of the main control: the control points of each
// instruction of the subset, and of unknown encodings, against a table written
// from the register transfers.
module tb_control;
  import mips_lite_pkg::*;
  logic [5:0] op, funct;
  ctrl_t      c;
  int checks = 0, failures = 0;

  control dut (.op(op), .funct(funct), .ctrl(c));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: {reg_dst, alu_src, mem_to_reg, reg_wr, mem_wr, branch, ext_op}, alu
  task automatic check(input string name, input logic [5:0] o, input logic [5:0] f,
                       input logic [6:0] bits, input logic [2:0] aluc, input logic care_alu,
                       input logic care_dst);
    op = o; funct = f;
    #1;
    checks++;
    if (c.alu_src !== bits[5] || c.mem_to_reg !== bits[4] || c.reg_wr !== bits[3] ||
        c.mem_wr !== bits[2] || c.branch !== bits[1] ||
        (care_dst && c.reg_dst !== bits[6]) ||
        (care_alu && (c.alu_ctrl !== aluc || c.ext_op !== bits[0]))) begin
      failures++;
      $display("FAIL %s: got %b", name, c);
    end
  endtask

  initial begin
    //                                     dst src m2r rwr mwr br ext
    check("addu", 6'h00, 6'h21, 7'b1_0_0_1_0_0_0, 3'b010, 1, 1);
    check("subu", 6'h00, 6'h23, 7'b1_0_0_1_0_0_0, 3'b110, 1, 1);
    check("ori",  6'h0d, 6'h3f, 7'b0_1_0_1_0_0_0, 3'b001, 1, 1);
    check("lw",   6'h23, 6'h00, 7'b0_1_1_1_0_0_1, 3'b010, 1, 1);
    check("sw",   6'h2b, 6'h11, 7'b0_1_0_0_1_0_1, 3'b010, 1, 0);
    check("beq",  6'h04, 6'h21, 7'b0_0_0_0_0_1_1, 3'b110, 1, 0);
    // unknown R-type funct and unknown opcodes: nothing written, no branch
    check("rtype other", 6'h00, 6'h20, 7'b0_0_0_0_0_0_0, 3'b000, 0, 0);
    for (int o = 1; o < 64; o++)
      if (!(o inside {6'h0d, 6'h23, 6'h2b, 6'h04}))
        check("unknown op", 6'(o), 6'($urandom), 7'b0_0_0_0_0_0_0, 3'b000, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
