// Self-checking testbench for instr_decoder. For random field values and
// every opcode it checks the operands, destination, branch and memory
// controls against the instruction table, with the register and sprite
// files modelled here; it also checks that a wrong sprite flag and unknown
// opcodes decode as invalid no-ops.
module tb_instr_decoder;
  import royale_pkg::*;
  instr_t instr;
  ridx_t ra1, ra2, ra3;
  word_t rv1, rv2, rv3;
  sidx_t rsa, rsb;
  sprite_t spa, spb;
  decoded_t d;
  word_t regs [32];
  sprite_t sprs [64];
  int checks = 0, failures = 0;

  instr_decoder dut (.instr, .ra1, .ra2, .ra3, .rv1, .rv2, .rv3, .rsa, .rsb, .spa, .spb, .d);

  assign rv1 = regs[ra1];
  assign rv2 = regs[ra2];
  assign rv3 = regs[ra3];
  assign spa = sprs[rsa];
  assign spb = sprs[rsb];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s op=%0d", what, instr[31:26]); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) regs[i] = $urandom;
    for (int s = 0; s < 64; s++) for (int k = 0; k < 8; k++) sprs[s][k] = sval_t'($urandom);
    for (int n = 0; n < 40; n++) begin
      for (int o = 0; o <= int'(OP_WAIT); o++) begin
        opcode_e op;
        logic [5:0] a, b, c;
        logic [13:0] imm;
        aidx_t ind, ind2;
        bit sp;
        word_t s14, s20;
        op = opcode_e'(o);
        a = 6'($urandom); b = 6'($urandom); c = 6'($urandom);
        imm = {c, 8'($urandom)}; ind = aidx_t'($urandom); ind2 = imm[2:0];
        sp = (o >= int'(OP_SPLI) && o <= int'(OP_DST));
        instr = mk_instr(op, a, b, imm, ind, sp);
        s14 = word_t'($signed(imm));
        s20 = word_t'($signed({b, imm}));
        #1;
        check(d.valid, "valid");
        case (op)
          OP_LI:   check(d.alu_op == ALU_PASS_B && d.b == s20 && d.wb == WB_REG && d.rd == a[4:0], "LI");
          OP_JMP:  check(d.br == BR_ALWAYS && d.br_target == {imm, 2'b00} && d.wb == WB_NONE, "JMP");
          OP_JAL:  check(d.br == BR_ALWAYS && d.link && d.wb == WB_REG && d.rd == a[4:0], "JAL");
          OP_JALR: check(d.br == BR_REG && d.link && d.a == regs[b[4:0]] && d.b == s14 && d.alu_op == ALU_ADD, "JALR");
          OP_BEQ, OP_BNE, OP_BLT, OP_BGE:
            check(d.br_cmp_a == regs[a[4:0]] && d.br_cmp_b == regs[b[4:0]] && d.br_target == {imm, 2'b00}
                  && d.br == br_e'(int'(BR_EQ) + o - int'(OP_BEQ)) && d.wb == WB_NONE, "branch");
          OP_LW:   check(d.mem_rd && d.a == regs[b[4:0]] && d.b == s14 && d.wb == WB_REG && d.rd == a[4:0], "LW");
          OP_SW:   check(d.mem_wr && d.a == regs[b[4:0]] && d.b == s14 && d.store_data == regs[a[4:0]] && d.wb == WB_NONE, "SW");
          OP_ADDI, OP_SUBI, OP_SLLI, OP_SRLI:
            check(d.a == regs[b[4:0]] && d.b == s14 && d.wb == WB_REG && d.rd == a[4:0]
                  && d.alu_op == alu_op_e'(o - int'(OP_ADDI)), "imm arith");
          OP_ADD, OP_SUB, OP_SLL, OP_SRL, OP_ABS:
            check(d.a == regs[b[4:0]] && d.b == regs[c[4:0]] && d.wb == WB_REG && d.rd == a[4:0]
                  && d.alu_op == alu_op_e'(o - int'(OP_ADD)), "reg arith");
          OP_SPLI:   check(d.b == s14 && d.alu_op == ALU_PASS_B && d.wb == WB_SPRITE && d.spd == a && d.ind == ind, "SPLI");
          OP_LISP:   check(d.b == word_t'(sprs[a][ind]) && d.alu_op == ALU_PASS_B && d.wb == WB_REG && d.rd == b[4:0], "LISP");
          OP_SPLREG: check(d.b == regs[b[4:0]] && d.alu_op == ALU_PASS_B && d.wb == WB_SPRITE && d.spd == a && d.ind == ind, "SPLREG");
          OP_SPADDI: check(d.a == regs[b[4:0]] && d.b == s14 && d.alu_op == ALU_ADD && d.wb == WB_SPRITE, "SPADDI");
          OP_SPSUBI: check(d.a == regs[b[4:0]] && d.b == s14 && d.alu_op == ALU_SUB && d.wb == WB_SPRITE, "SPSUBI");
          OP_SPADD:  check(d.a == word_t'(sprs[a][ind]) && d.b == regs[b[4:0]] && d.alu_op == ALU_ADD && d.wb == WB_SPRITE, "SPADD");
          OP_SPSUB:  check(d.a == word_t'(sprs[a][ind]) && d.b == regs[b[4:0]] && d.alu_op == ALU_SUB && d.wb == WB_SPRITE, "SPSUB");
          OP_ADDSP:  check(d.a == regs[b[4:0]] && d.b == word_t'(sprs[a][ind]) && d.alu_op == ALU_ADD && d.wb == WB_REG && d.rd == b[4:0], "ADDSP");
          OP_SUBSP:  check(d.a == regs[b[4:0]] && d.b == word_t'(sprs[a][ind]) && d.alu_op == ALU_SUB && d.wb == WB_REG && d.rd == b[4:0], "SUBSP");
          OP_SPLW:   check(d.mem_rd && d.a == regs[b[4:0]] && d.b == s14 && d.wb == WB_SPRITE && d.spd == a && d.ind == ind, "SPLW");
          OP_SPSW:   check(d.mem_wr && d.a == regs[b[4:0]] && d.b == s14 && d.store_data == word_t'(sprs[a][ind]), "SPSW");
          OP_ATTACK: check(d.a == word_t'(sprs[a][ind]) && d.b == word_t'(sprs[b][ind2]) && d.alu_op == ALU_SUB
                           && d.wb == WB_SPRITE && d.spd == a && d.ind == ind, "ATTACK");
          OP_DST:    check(d.alu_op == ALU_DIST && d.wb == WB_REG && d.rd == a[4:0]
                           && d.a == {3'b0, sprs[b][1], 3'b0, sprs[b][2]}
                           && d.b == {3'b0, sprs[c][1], 3'b0, sprs[c][2]}, "DST");
          OP_WAIT:   check(d.is_wait && d.b == word_t'({b, imm}), "WAIT");
          default:   check(d.wb == WB_NONE && d.br == BR_NONE && !d.mem_wr, "NOP");
        endcase
        // flipped sprite flag: must be an invalid no-op
        instr = mk_instr(op, a, b, imm, ind, !sp);
        #1;
        check(!d.valid && d.wb == WB_NONE && d.br == BR_NONE && !d.mem_wr && !d.mem_rd, "flag mismatch");
      end
      instr = {3'b0, 1'b0, 6'($urandom_range(34, 63)), 26'($urandom)};
      #1;
      check(!d.valid && d.wb == WB_NONE && !d.mem_wr, "unknown opcode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
