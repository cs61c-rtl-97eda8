// Reference model and assembler for the MIPS-lite testbenches.
//
// mips_lite_ref is an instruction-level model written straight from the
// register transfers of the six instructions (PC + 4 sequencing, beq target
// PC + 4 + sext(imm) * 4, zero-extended ori immediate, register 0 fixed at 0).
// Memories have 2**AW words selected by byte-address bits AW+1:2, like the
// RTL memory. The enc_* functions build instruction words with the standard
// MIPS encodings.
package mips_lite_ref_pkg;

  function automatic logic [31:0] enc_r(logic [5:0] fn, int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] enc_i(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] addu(int rd, int rs, int rt); return enc_r(6'h21, rd, rs, rt); endfunction
  function automatic logic [31:0] subu(int rd, int rs, int rt); return enc_r(6'h23, rd, rs, rt); endfunction
  function automatic logic [31:0] ori (int rt, int rs, int imm); return enc_i(6'h0d, rt, rs, imm); endfunction
  function automatic logic [31:0] lw  (int rt, int rs, int imm); return enc_i(6'h23, rt, rs, imm); endfunction
  function automatic logic [31:0] sw  (int rt, int rs, int imm); return enc_i(6'h2b, rt, rs, imm); endfunction
  function automatic logic [31:0] beq (int rs, int rt, int off); return enc_i(6'h04, rt, rs, off); endfunction

  // what the last step did, for coverage counting
  typedef enum int {K_ADDU, K_SUBU, K_ORI, K_LW, K_SW, K_BEQ_TAKEN, K_BEQ_NOT_TAKEN, K_OTHER, K_NUM} kind_e;

  class mips_lite_ref #(int AW = 8);
    logic [31:0] pc;
    logic [31:0] r    [32];
    logic [31:0] dmem [2**AW];
    kind_e       kind;
    // store seen in the last step
    logic        st_en;
    logic [31:0] st_addr, st_data;

    function new();
      pc = 0;
      foreach (r[i]) r[i] = 0;
      foreach (dmem[i]) dmem[i] = 0;
    endfunction

    function automatic logic [AW-1:0] widx(logic [31:0] a);
      return a[AW+1:2];
    endfunction

    function void step(logic [31:0] ins);
      logic [5:0]  op;
      logic [4:0]  rs, rt, rd;
      logic [31:0] sext, zext, a, b, npc;
      op = ins[31:26]; rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11];
      sext = {{16{ins[15]}}, ins[15:0]};
      zext = {16'h0, ins[15:0]};
      a = r[rs]; b = r[rt];
      npc = pc + 4;
      st_en = 0;
      kind = K_OTHER;
      case (op)
        6'h00: begin
          if (ins[5:0] == 6'h21) begin if (rd != 0) r[rd] = a + b; kind = K_ADDU; end
          else if (ins[5:0] == 6'h23) begin if (rd != 0) r[rd] = a - b; kind = K_SUBU; end
        end
        6'h0d: begin if (rt != 0) r[rt] = a | zext; kind = K_ORI; end
        6'h23: begin if (rt != 0) r[rt] = dmem[widx(a + sext)]; kind = K_LW; end
        6'h2b: begin
          dmem[widx(a + sext)] = b;
          st_en = 1; st_addr = a + sext; st_data = b;
          kind = K_SW;
        end
        6'h04: begin
          if (a == b) begin npc = pc + 4 + (sext << 2); kind = K_BEQ_TAKEN; end
          else kind = K_BEQ_NOT_TAKEN;
        end
        default: ;
      endcase
      pc = npc;
    endfunction
  endclass

endpackage
