// instr_decoder: decode stage of the game processor (combinational).
//
// Splits the 36-bit instruction into its fields, drives the read addresses of
// the register file (fields a, b, c) and of the sprite file (sprites a and
// b; b and c for DST), and from the values read forms the operands the report calls rs1 and
// rs2 (here `a` and `b` of decoded_t), the destination (register, or sprite
// plus attribute), the branch condition and target and the memory action.
// The field layout is given in royale_pkg. The report fixes only the top
// bits: three bits of attribute index and a sprite-instruction flag. An
// instruction whose flag disagrees with its opcode, or whose opcode is
// unknown, is decoded as invalid and executes as a no-op.
// Branch and jump targets are instruction indices; they are turned into byte
// addresses (x4) here so that pc+4 and JALR follow RISC-V.
module instr_decoder
  import royale_pkg::*;
(
  input  instr_t   instr,
  output ridx_t    ra1,       // register named by field a
  output ridx_t    ra2,       // register named by field b
  output ridx_t    ra3,       // register named by field c
  input  word_t    rv1,
  input  word_t    rv2,
  input  word_t    rv3,
  output sidx_t    rsa,       // first sprite read
  output sidx_t    rsb,       // second sprite read
  input  sprite_t  spa,
  input  sprite_t  spb,
  output decoded_t d
);
  aidx_t      ind;
  logic       sp;
  logic [5:0] op_raw;
  logic [5:0] fa, fb, fc;
  word_t      imm14s, imm20s, imm20u, target;
  aidx_t      ind2;
  logic       sprite_op;
  opcode_e    op;

  assign ind    = instr[35:33];
  assign sp     = instr[32];
  assign op_raw = instr[31:26];
  assign fa     = instr[25:20];
  assign fb     = instr[19:14];
  assign fc     = instr[13:8];
  assign ind2   = instr[2:0];
  assign imm14s = word_t'($signed(instr[13:0]));
  assign imm20s = word_t'($signed(instr[19:0]));
  assign imm20u = word_t'(instr[19:0]);
  assign target = word_t'({instr[13:0], 2'b00});
  assign op     = opcode_e'(op_raw);

  assign ra1 = fa[4:0];
  assign ra2 = fb[4:0];
  assign ra3 = fc[4:0];
  // DST names its destination register in field a and its two sprites in
  // fields b and c; every other sprite instruction names sprites in a and b.
  assign rsa = (op_raw == OP_DST) ? fb : fa;
  assign rsb = (op_raw == OP_DST) ? fc : fb;

  function automatic word_t sv(sval_t v);
    return word_t'(v);
  endfunction

  always_comb begin
    sprite_op = (op_raw >= OP_SPLI) && (op_raw <= OP_DST);

    d            = '0;
    d.alu_op     = ALU_ADD;
    d.br         = BR_NONE;
    d.wb         = WB_NONE;
    d.rd         = fa[4:0];
    d.spd        = fa;
    d.ind        = ind;
    d.br_target  = target;
    d.br_cmp_a   = rv1;
    d.br_cmp_b   = rv2;
    d.sp_flag    = sp;
    d.valid      = 1'b1;

    case (op)
      OP_NOP:  ;
      OP_LI:   begin d.alu_op = ALU_PASS_B; d.b = imm20s; d.wb = WB_REG; end
      OP_JMP:  d.br = BR_ALWAYS;
      OP_JAL:  begin d.br = BR_ALWAYS; d.link = 1'b1; d.wb = WB_REG; end
      OP_JALR: begin
        d.br = BR_REG; d.link = 1'b1; d.wb = WB_REG;
        d.a = rv2; d.b = imm14s;                       // target = rs1 + const
      end
      OP_BEQ:  d.br = BR_EQ;
      OP_BNE:  d.br = BR_NE;
      OP_BLT:  d.br = BR_LT;
      OP_BGE:  d.br = BR_GE;
      OP_LW:   begin d.a = rv2; d.b = imm14s; d.mem_rd = 1'b1; d.wb = WB_REG; end
      OP_SW:   begin d.a = rv2; d.b = imm14s; d.mem_wr = 1'b1; d.store_data = rv1; end
      OP_ADDI: begin d.a = rv2; d.b = imm14s; d.wb = WB_REG; end
      OP_SUBI: begin d.a = rv2; d.b = imm14s; d.alu_op = ALU_SUB; d.wb = WB_REG; end
      OP_SLLI: begin d.a = rv2; d.b = imm14s; d.alu_op = ALU_SLL; d.wb = WB_REG; end
      OP_SRLI: begin d.a = rv2; d.b = imm14s; d.alu_op = ALU_SRL; d.wb = WB_REG; end
      OP_ADD:  begin d.a = rv2; d.b = rv3; d.wb = WB_REG; end
      OP_SUB:  begin d.a = rv2; d.b = rv3; d.alu_op = ALU_SUB; d.wb = WB_REG; end
      OP_SLL:  begin d.a = rv2; d.b = rv3; d.alu_op = ALU_SLL; d.wb = WB_REG; end
      OP_SRL:  begin d.a = rv2; d.b = rv3; d.alu_op = ALU_SRL; d.wb = WB_REG; end
      OP_ABS:  begin d.a = rv2; d.b = rv3; d.alu_op = ALU_ABS; d.wb = WB_REG; end
      // sprite instructions
      OP_SPLI:   begin d.alu_op = ALU_PASS_B; d.b = imm14s; d.wb = WB_SPRITE; end
      OP_LISP:   begin d.alu_op = ALU_PASS_B; d.b = sv(spa[ind]); d.wb = WB_REG; d.rd = fb[4:0]; end
      OP_SPLREG: begin d.alu_op = ALU_PASS_B; d.b = rv2; d.wb = WB_SPRITE; end
      OP_SPADDI: begin d.a = rv2; d.b = imm14s; d.wb = WB_SPRITE; end
      OP_SPSUBI: begin d.a = rv2; d.b = imm14s; d.alu_op = ALU_SUB; d.wb = WB_SPRITE; end
      OP_SPADD:  begin d.a = sv(spa[ind]); d.b = rv2; d.wb = WB_SPRITE; end
      OP_SPSUB:  begin d.a = sv(spa[ind]); d.b = rv2; d.alu_op = ALU_SUB; d.wb = WB_SPRITE; end
      OP_ADDSP:  begin d.a = rv2; d.b = sv(spa[ind]); d.wb = WB_REG; d.rd = fb[4:0]; end
      OP_SUBSP:  begin d.a = rv2; d.b = sv(spa[ind]); d.alu_op = ALU_SUB; d.wb = WB_REG; d.rd = fb[4:0]; end
      OP_SPLW:   begin d.a = rv2; d.b = imm14s; d.mem_rd = 1'b1; d.wb = WB_SPRITE; end
      OP_SPSW:   begin d.a = rv2; d.b = imm14s; d.mem_wr = 1'b1; d.store_data = sv(spa[ind]); end
      OP_ATTACK: begin d.a = sv(spa[ind]); d.b = sv(spb[ind2]); d.alu_op = ALU_SUB; d.wb = WB_SPRITE; end
      OP_DST: begin
        d.alu_op = ALU_DIST; d.wb = WB_REG;
        d.a = {3'b0, spa[ATTR_X], 3'b0, spa[ATTR_Y]};
        d.b = {3'b0, spb[ATTR_X], 3'b0, spb[ATTR_Y]};
      end
      OP_WAIT: begin d.is_wait = 1'b1; d.b = imm20u; end
      default: d.valid = 1'b0;
    endcase

    if (op_raw > OP_WAIT || sp != sprite_op) begin
      d.valid  = 1'b0;
      d.wb     = WB_NONE;
      d.br     = BR_NONE;
      d.link   = 1'b0;
      d.mem_rd = 1'b0;
      d.mem_wr = 1'b0;
      d.is_wait = 1'b0;
    end
  end
endmodule
