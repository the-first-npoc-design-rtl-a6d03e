// tb_npoc_alu: self-checking test of the ALU.
// Random operands for every operation and jump kind, compared with results
// computed in the testbench.
module tb_npoc_alu;
  import npoc_pkg::*;
  alu_op_e op;
  jmp_e jmp;
  word_t a, b, res;
  logic j;
  int checks = 0, failures = 0;

  npoc_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t er;
    logic ej;
    for (int n = 0; n < 3000; n++) begin
      op  = alu_op_e'($urandom_range(0, 5));
      jmp = jmp_e'($urandom_range(0, 2));
      a   = $urandom;
      b   = (n % 4 == 0) ? a : $urandom;
      if (n % 9 == 0) b = word_t'(-1);
      #1;
      case (op)
        ALU_ADD: er = a + b;
        ALU_MUL: er = word_t'(64'(a) * 64'(b));
        ALU_OR:  er = a | b;
        ALU_NOT: er = ~a;
        ALU_EQ:  er = (a == b) ? 1 : 0;
        default: er = (a != b) ? 1 : 0;
      endcase
      ej = (jmp == JMP_ALWAYS) || (jmp == JMP_COND && er[0]);
      checks++;
      if (res !== er || j !== ej) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h res=%h exp=%h j=%b exp=%b", op.name(), a, b, res, er, j, ej);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
