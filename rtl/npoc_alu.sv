// npoc_alu: the NPoC arithmetic and logical unit, used by every instruction.
//
// Combinational. Operand A comes from r2, operand B from r3 or the
// sign-extended immediate. Besides the result (Alures) it produces J, the
// jump decision: always set for jump, set for jeq when A equals B and for jdi
// when A differs from B. For loads, stores and the network instructions the
// ALU forms the address r2 + immed. Fixed-point only: add, 32x32 multiply
// keeping the low 32 bits, OR, NOT and the two comparisons. The operation set
// follows the instruction tables; the comparison producing J inside the ALU
// follows the pipeline figure, where J leaves the ALU.
module npoc_alu
  import npoc_pkg::*;
(
  input  alu_op_e op,
  input  jmp_e    jmp,
  input  word_t   a,
  input  word_t   b,
  output word_t   res,
  output logic    j
);

  always_comb begin
    unique case (op)
      ALU_ADD: res = a + b;
      ALU_MUL: res = a * b;
      ALU_OR:  res = a | b;
      ALU_NOT: res = ~a;
      ALU_EQ:  res = word_t'(a == b);
      ALU_NE:  res = word_t'(a != b);
      default: res = a + b;
    endcase
    unique case (jmp)
      JMP_ALWAYS: j = 1'b1;
      JMP_COND:   j = res[0];
      default:    j = 1'b0;
    endcase
  end

endmodule
