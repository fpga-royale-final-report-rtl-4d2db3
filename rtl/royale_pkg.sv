// royale_pkg: types and constants shared by the FPGA Royale processor,
// renderer, sprite file and graphics modules.
//
// The 36-bit instruction word is laid out as follows (the report fixes only
// the top four bits; the rest of the layout is this design's own choice):
//   [35:33] ind   sprite attribute index (0..7)
//   [32]    sp    set on every sprite instruction
//   [31:26] op    opcode (opcode_e)
//   [25:20] a     rd, or the first sprite (spd / sp1), or rs1 of a branch/SW
//   [19:14] b     rs1, rsd, the second sprite (sp2), rs2 of a branch, or
//                 the first sprite of DST
//   [13:8]  c     rs2 of register-register instructions, second sprite of DST
//   [13:0]  imm14 signed immediate, offset, or branch/jump target (word index)
//   [19:0]  imm20 constant of LI and cycle count of WAIT
//   [2:0]   ind2  second attribute index of ATTACK
package royale_pkg;

  localparam int unsigned XLEN       = 32;
  localparam int unsigned NREGS      = 32;
  localparam int unsigned NSPRITES   = 64;
  localparam int unsigned NATTR      = 8;
  localparam int unsigned SVAL_W     = 13;
  localparam int unsigned INSTR_W    = 36;

  // Attribute indices that the hardware itself relies on.
  localparam int unsigned ATTR_TYPE  = 0;
  localparam int unsigned ATTR_X     = 1;
  localparam int unsigned ATTR_Y     = 2;
  localparam int unsigned ATTR_FRAME = 3;
  localparam int unsigned ATTR_HP    = 4;
  localparam int unsigned ATTR_STATE = 6;

  // Sprites wired to the two mice, registers holding the elixir counts.
  localparam int unsigned MOUSE0_SPRITE = 62;
  localparam int unsigned MOUSE1_SPRITE = 63;
  localparam int unsigned ELIXIR0_REG   = 30;
  localparam int unsigned ELIXIR1_REG   = 31;

  typedef logic [SVAL_W-1:0]        sval_t;
  typedef sval_t [NATTR-1:0]        sprite_t;   // one sprite record
  typedef logic [5:0]               sidx_t;     // sprite number
  typedef logic [2:0]               aidx_t;     // attribute number
  typedef logic [4:0]               ridx_t;     // register number
  typedef logic [XLEN-1:0]          word_t;
  typedef logic [INSTR_W-1:0]       instr_t;

  typedef enum logic [5:0] {
    OP_NOP    = 6'd0,
    OP_LI     = 6'd1,
    OP_JMP    = 6'd2,
    OP_JAL    = 6'd3,
    OP_JALR   = 6'd4,
    OP_BEQ    = 6'd5,
    OP_BNE    = 6'd6,
    OP_BLT    = 6'd7,
    OP_BGE    = 6'd8,
    OP_LW     = 6'd9,
    OP_SW     = 6'd10,
    OP_ADDI   = 6'd11,
    OP_SUBI   = 6'd12,
    OP_SLLI   = 6'd13,
    OP_SRLI   = 6'd14,
    OP_ADD    = 6'd15,
    OP_SUB    = 6'd16,
    OP_SLL    = 6'd17,
    OP_SRL    = 6'd18,
    OP_ABS    = 6'd19,
    OP_SPLI   = 6'd20,
    OP_LISP   = 6'd21,
    OP_SPLREG = 6'd22,
    OP_SPADDI = 6'd23,
    OP_SPSUBI = 6'd24,
    OP_SPADD  = 6'd25,
    OP_SPSUB  = 6'd26,
    OP_ADDSP  = 6'd27,
    OP_SUBSP  = 6'd28,
    OP_SPLW   = 6'd29,
    OP_SPSW   = 6'd30,
    OP_ATTACK = 6'd31,
    OP_DST    = 6'd32,
    OP_WAIT   = 6'd33
  } opcode_e;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SRL, ALU_ABS, ALU_DIST, ALU_PASS_B
  } alu_op_e;

  typedef enum logic [2:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LT, BR_GE, BR_ALWAYS, BR_REG
  } br_e;

  typedef enum logic [1:0] {
    WB_NONE, WB_REG, WB_SPRITE
  } wb_e;

  // Output of the decoder, consumed by the ALU and the memory stage.
  typedef struct packed {
    logic    valid;      // legal instruction
    alu_op_e alu_op;
    word_t   a;          // first operand ("rs1" value)
    word_t   b;          // second operand ("rs2" value)
    br_e     br;
    word_t   br_target;  // byte address for BR_EQ..BR_ALWAYS
    word_t   br_cmp_a;
    word_t   br_cmp_b;
    logic    link;       // write pc+4 to rd (JAL/JALR)
    logic    mem_rd;
    logic    mem_wr;
    word_t   mem_off;    // LW/SW: address = a + mem_off
    word_t   store_data;
    wb_e     wb;
    ridx_t   rd;
    sidx_t   spd;
    aidx_t   ind;
    logic    is_wait;
    logic    sp_flag;
  } decoded_t;

  function automatic instr_t mk_instr(opcode_e op, logic [5:0] a, logic [5:0] b,
                                      logic [13:0] imm14, logic [2:0] ind, logic sp);
    return {ind, sp, op, a, b, imm14};
  endfunction

endpackage
