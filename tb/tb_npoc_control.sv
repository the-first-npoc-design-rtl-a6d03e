// tb_npoc_control: self-checking test of the control unit.
// For each opcode, compares the decoded control bits with a table written
// from the instruction definitions, with r1 zero and non-zero.
module tb_npoc_control;
  import npoc_pkg::*;
  instr_t ins;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  npoc_control dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected: {reg_write, wb_sel, alu_op, b_imm, use r1 r2 r3, dmem r w, bctu r w, sch, rec, jmp}
  function automatic ctrl_t expect_of(opcode_e op);
    ctrl_t c = CTRL_NOP;
    case (op)
      OP_ADD:   begin c.reg_write=1; c.use_r2=1; c.use_r3=1; end
      OP_MUL:   begin c.reg_write=1; c.use_r2=1; c.use_r3=1; c.alu_op=ALU_MUL; end
      OP_ADDI:  begin c.reg_write=1; c.use_r2=1; c.b_imm=1; end
      OP_ORI:   begin c.reg_write=1; c.use_r2=1; c.b_imm=1; c.alu_op=ALU_OR; end
      OP_NOT:   begin c.reg_write=1; c.use_r2=1; c.alu_op=ALU_NOT; end
      OP_LOAD:  begin c.reg_write=1; c.use_r2=1; c.b_imm=1; c.dmem_read=1; c.wb_sel=WB_DMEM; end
      OP_STORE: begin c.use_r1=1; c.use_r2=1; c.b_imm=1; c.dmem_write=1; end
      OP_JUMP:  begin c.reg_write=1; c.use_r2=1; c.b_imm=1; c.wb_sel=WB_LINK; c.jmp=JMP_ALWAYS; end
      OP_JEQ:   begin c.use_r1=1; c.use_r2=1; c.use_r3=1; c.alu_op=ALU_EQ; c.jmp=JMP_COND; end
      OP_JDI:   begin c.use_r1=1; c.use_r2=1; c.use_r3=1; c.alu_op=ALU_NE; c.jmp=JMP_COND; end
      OP_READ:  begin c.reg_write=1; c.use_r2=1; c.b_imm=1; c.bctu_read=1; c.wb_sel=WB_BCTU; end
      OP_WRITE: begin c.use_r1=1; c.use_r2=1; c.b_imm=1; c.bctu_write=1; end
      OP_SEND:  begin c.use_r1=1; c.use_r2=1; c.b_imm=1; c.sch_cmd=SCH_SEND; end
      OP_BLOCK: begin c.use_r1=1; c.use_r2=1; c.b_imm=1; c.sch_cmd=SCH_BLOCK; end
      OP_ERASE: begin c.use_r1=1; c.use_r2=1; c.b_imm=1; c.sch_cmd=SCH_ERASE; end
      OP_RECONF:begin c.use_r1=1; c.rec_write=1; end
      default: ;
    endcase
    return c;
  endfunction

  initial begin
    ctrl_t e;
    for (int o = 0; o < 32; o++) begin
      for (int r = 0; r < 2; r++) begin
        ins = {5'(o), 5'(r != 0 ? 7 : 0), 5'd3, 5'd4, 12'h123};
        #1;
        e = expect_of(opcode_e'(o));
        if (r == 0) e.reg_write = 0;
        checks++;
        if (ctrl !== e) begin
          failures++;
          $display("FAIL opcode %0d r1=%0d ctrl=%h exp=%h", o, r, ctrl, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
