// npoc_control: the NPoC control unit (instruction decoder).
//
// Combinational. Turns the opcode of the instruction in ID into the control
// bits that travel with it through ID/EX, EX/ME and ME/WB: which ALU
// operation to run, whether operand B is the immediate, which registers are
// read (for forwarding and the load-use interlock), which fourth-stage unit
// is used (data memory, BCTU, scheduler, reconfiguration register), whether
// and from where r1 is written back, and whether the instruction may jump.
// Register 0 as destination disables the write. The mapping follows the two
// instruction tables; unlisted opcodes decode as no operation.
module npoc_control
  import npoc_pkg::*;
(
  input  instr_t ins,
  output ctrl_t  ctrl
);

  always_comb begin
    ctrl = CTRL_NOP;
    unique case (ins.op)
      OP_ADD:   begin ctrl.reg_write = 1'b1; ctrl.use_r2 = 1'b1; ctrl.use_r3 = 1'b1; end
      OP_MUL:   begin ctrl.reg_write = 1'b1; ctrl.use_r2 = 1'b1; ctrl.use_r3 = 1'b1;
                      ctrl.alu_op = ALU_MUL; end
      OP_ADDI:  begin ctrl.reg_write = 1'b1; ctrl.use_r2 = 1'b1; ctrl.b_imm = 1'b1; end
      OP_ORI:   begin ctrl.reg_write = 1'b1; ctrl.use_r2 = 1'b1; ctrl.b_imm = 1'b1;
                      ctrl.alu_op = ALU_OR; end
      OP_NOT:   begin ctrl.reg_write = 1'b1; ctrl.use_r2 = 1'b1; ctrl.alu_op = ALU_NOT; end
      OP_LOAD:  begin ctrl.reg_write = 1'b1; ctrl.use_r2 = 1'b1; ctrl.b_imm = 1'b1;
                      ctrl.dmem_read = 1'b1; ctrl.wb_sel = WB_DMEM; end
      OP_STORE: begin ctrl.use_r1 = 1'b1; ctrl.use_r2 = 1'b1; ctrl.b_imm = 1'b1;
                      ctrl.dmem_write = 1'b1; end
      OP_JUMP:  begin ctrl.reg_write = 1'b1; ctrl.use_r2 = 1'b1; ctrl.b_imm = 1'b1;
                      ctrl.wb_sel = WB_LINK; ctrl.jmp = JMP_ALWAYS; end
      OP_JEQ:   begin ctrl.use_r1 = 1'b1; ctrl.use_r2 = 1'b1; ctrl.use_r3 = 1'b1;
                      ctrl.alu_op = ALU_EQ; ctrl.jmp = JMP_COND; end
      OP_JDI:   begin ctrl.use_r1 = 1'b1; ctrl.use_r2 = 1'b1; ctrl.use_r3 = 1'b1;
                      ctrl.alu_op = ALU_NE; ctrl.jmp = JMP_COND; end
      OP_READ:  begin ctrl.reg_write = 1'b1; ctrl.use_r2 = 1'b1; ctrl.b_imm = 1'b1;
                      ctrl.bctu_read = 1'b1; ctrl.wb_sel = WB_BCTU; end
      OP_WRITE: begin ctrl.use_r1 = 1'b1; ctrl.use_r2 = 1'b1; ctrl.b_imm = 1'b1;
                      ctrl.bctu_write = 1'b1; end
      OP_SEND:  begin ctrl.use_r1 = 1'b1; ctrl.use_r2 = 1'b1; ctrl.b_imm = 1'b1;
                      ctrl.sch_cmd = SCH_SEND; end
      OP_BLOCK: begin ctrl.use_r1 = 1'b1; ctrl.use_r2 = 1'b1; ctrl.b_imm = 1'b1;
                      ctrl.sch_cmd = SCH_BLOCK; end
      OP_ERASE: begin ctrl.use_r1 = 1'b1; ctrl.use_r2 = 1'b1; ctrl.b_imm = 1'b1;
                      ctrl.sch_cmd = SCH_ERASE; end
      OP_RECONF:begin ctrl.use_r1 = 1'b1; ctrl.rec_write = 1'b1; end
      default:  ctrl = CTRL_NOP;
    endcase
    if (ins.r1 == '0) ctrl.reg_write = 1'b0;
  end

endmodule
