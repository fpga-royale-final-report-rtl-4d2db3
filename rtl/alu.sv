// alu: the ALU stage of the game processor (purely combinational).
//
// Operations: add, subtract, logical shifts (shift amount = low 5 bits of b),
// absolute difference |a-b| (ABS), and the Manhattan distance of DST. For DST
// each operand packs one sprite position, x in bits [28:16] and y in [12:0],
// and the result is |x1-x2| + |y1-y2|. PASS_B forwards b (loads of constants
// and sprite/register moves).
// Branch condition: equal, not equal, less than and greater-or-equal compare
// the two register values as signed numbers, as RISC-V does; the report's
// instruction table leaves the signedness of BLT/BGE open.
module alu
  import royale_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  input  br_e     br,
  input  word_t   cmp_a,
  input  word_t   cmp_b,
  output word_t   res,
  output logic    taken
);
  function automatic word_t absdiff(word_t x, word_t y);
    return (x >= y) ? x - y : y - x;
  endfunction

  always_comb begin
    unique case (op)
      ALU_ADD:    res = a + b;
      ALU_SUB:    res = a - b;
      ALU_SLL:    res = a << b[4:0];
      ALU_SRL:    res = a >> b[4:0];
      ALU_ABS:    res = absdiff(a, b);
      ALU_DIST:   res = absdiff(word_t'(a[28:16]), word_t'(b[28:16]))
                      + absdiff(word_t'(a[12:0]), word_t'(b[12:0]));
      ALU_PASS_B: res = b;
      default:    res = '0;
    endcase
  end

  always_comb begin
    unique case (br)
      BR_EQ:     taken = (cmp_a == cmp_b);
      BR_NE:     taken = (cmp_a != cmp_b);
      BR_LT:     taken = ($signed(cmp_a) <  $signed(cmp_b));
      BR_GE:     taken = ($signed(cmp_a) >= $signed(cmp_b));
      BR_ALWAYS: taken = 1'b1;
      BR_REG:    taken = 1'b1;
      default:   taken = 1'b0;
    endcase
  end
endmodule
