// tb_npoc_cpu: self-checking test of the NPoC pipeline.
// Runs a program that uses every instruction: arithmetic with results
// forwarded from EX/ME and ME/WB, load and read followed at once by a use
// (one-cycle interlock), store, BCTU reads and writes of status registers and
// packet words, send/block/erase, reconf, jump with link, jeq and jdi taken
// and not taken (the three younger instructions must be squashed). The BCTU
// and scheduler sides are modelled here. Checked: final registers, data
// memory, every BCTU/scheduler/reconfiguration access, and timing: one
// instruction per clock, five clocks from fetch to write-back, one bubble per
// load-use pair and three per taken jump.
module tb_npoc_cpu;
  import npoc_pkg::*;
  import npoc_asm_pkg::*;
  localparam int NB = 8, NP = 4, PW = 16, NPORTS = 8;
  logic clk = 0, rst_n = 0;
  logic prog_we = 0, dload_we = 0;
  word_t prog_addr = 0, prog_data = 0, dload_addr = 0, dload_data = 0;
  logic [2:0] pkt_buf;
  logic [5:0] pkt_off;
  logic pkt_we;
  word_t pkt_wdata, pkt_rdata, st_wdata;
  logic [NB-1:0] st_we;
  word_t st_q [NB];
  logic [NPORTS-1:0] xbar_rows [NPORTS];
  sch_cmd_e sch_cmd;
  word_t sch_buf, sch_pkt, topo, topo_count, pc_if;
  logic topo_updated, ev_retire, ev_stall, ev_flush, ev_fwd_f1, ev_fwd_f2;
  int checks = 0, failures = 0;

  npoc_cpu #(.IMEM_DEPTH(256), .DMEM_DEPTH(256), .NB(NB), .NP(NP), .PW(PW), .NPORTS(NPORTS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // BCTU and scheduler side models
  assign pkt_rdata = {16'hBEEF, 5'd0, pkt_buf, 2'd0, pkt_off};
  string log [$];
  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < NB; b++) if (st_we[b]) begin
      st_q[b] <= st_wdata;
      log.push_back($sformatf("st%0d=%0h", b + 1, st_wdata));
    end
    if (pkt_we) log.push_back($sformatf("pkt%0d.%0d=%0h", pkt_buf, pkt_off, pkt_wdata));
    if (sch_cmd != SCH_NONE) log.push_back($sformatf("%s b%0d p%0d", sch_cmd.name(), sch_buf, sch_pkt));
    if (topo_updated) log.push_back($sformatf("topo=%0h", topo));
  end

  word_t prog [$];
  function automatic int here();
    return prog.size() * 4;
  endfunction

  int cyc = 0, retire_cyc [$], n_stall = 0, n_flush = 0, n_f1 = 0, n_f2 = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_retire) retire_cyc.push_back(cyc);
    if (ev_stall) n_stall++;
    if (ev_flush) n_flush++;
    if (ev_fwd_f1) n_f1++;
    if (ev_fwd_f2) n_f2++;
    cyc++;
  end

  initial begin
    int l_jump, l_after, l_eq, l_end, l_nt;
    string exp_log [$];
    foreach (st_q[i]) st_q[i] = 32'h30 + i;
    foreach (xbar_rows[i]) xbar_rows[i] = 8'(1 << i);
    // ---- program ----
    prog.push_back(asm_i(OP_ADDI, 1, 0, 9));        // 0  r1 = 9
    prog.push_back(asm_i(OP_ADDI, 2, 0, -3));       // 1  r2 = -3
    prog.push_back(asm_r(OP_ADD, 3, 1, 2));         // 2  r3 = 6 (F1, F2)
    prog.push_back(asm_r(OP_MUL, 4, 3, 1));         // 3  r4 = 54
    prog.push_back(asm_i(OP_ORI, 5, 4, 'h100));     // 4  r5 = 0x136
    prog.push_back(asm_r(OP_NOT, 6, 5, 0));         // 5  r6 = ~0x136
    prog.push_back(asm_i(OP_STORE, 4, 0, 20));      // 6  dmem[20] = 54
    prog.push_back(asm_i(OP_LOAD, 7, 0, 20));       // 7  r7 = 54
    prog.push_back(asm_r(OP_ADD, 8, 7, 7));         // 8  r8 = 108 (stall)
    prog.push_back(asm_i(OP_READ, 9, 0, 3));        // 9  r9 = status 3 = 0x32
    prog.push_back(asm_i(OP_ADDI, 10, 9, 1));       // 10 r10 = 0x33 (stall)
    prog.push_back(asm_i(OP_WRITE, 10, 0, 5));      // 11 status 5 = 0x33
    prog.push_back(asm_i(OP_ADDI, 11, 0, 128));
    prog.push_back(asm_i(OP_ADDI, 12, 0, 256));
    prog.push_back(asm_r(OP_MUL, 11, 11, 12));      // r11 = 0x8000
    prog.push_back(asm_i(OP_READ, 13, 11, 37));     // buffer 0 word 37
    prog.push_back(asm_i(OP_READ, 14, 11, 70));     // buffer 1 word 6
    prog.push_back(asm_i(OP_WRITE, 1, 11, 5));      // buffer 0 word 5 = 9
    prog.push_back(asm_i(OP_READ, 16, 0, 'h7ff));   // unmapped: 0
    prog.push_back(asm_i(OP_ADDI, 15, 0, 2));
    prog.push_back(asm_i(OP_SEND, 15, 0, 3));       // send b2 p3
    prog.push_back(asm_i(OP_BLOCK, 15, 1, -6));     // block b2 p3
    prog.push_back(asm_i(OP_ERASE, 15, 0, 1));      // erase b2 p1
    prog.push_back(asm_r(OP_RECONF, 4, 0, 0));      // topo = 54
    l_jump = here();
    prog.push_back(asm_i(OP_JUMP, 20, 0, 0));       // patched below: jump to l_after
    prog.push_back(asm_i(OP_ADDI, 21, 0, 1));       // squashed
    prog.push_back(asm_i(OP_ADDI, 21, 0, 2));       // squashed
    prog.push_back(asm_i(OP_ADDI, 21, 0, 3));       // squashed
    prog.push_back(asm_i(OP_ADDI, 21, 0, 4));       // skipped
    l_after = here();
    prog.push_back(asm_r(OP_ADD, 26, 20, 0));       // r26 = link
    prog.push_back(asm_i(OP_ADDI, 22, 0, 0));       // patched: r22 = l_eq
    prog.push_back(asm_r(OP_JEQ, 22, 1, 1));        // taken
    prog.push_back(asm_i(OP_ADDI, 23, 0, 1));       // squashed
    prog.push_back(asm_i(OP_ADDI, 23, 0, 2));       // squashed
    prog.push_back(asm_i(OP_ADDI, 23, 0, 3));       // squashed
    l_eq = here();
    prog.push_back(asm_r(OP_JDI, 22, 1, 1));        // not taken
    prog.push_back(asm_i(OP_ADDI, 24, 0, 7));       // runs
    prog.push_back(asm_r(OP_JEQ, 22, 1, 2));        // not taken
    prog.push_back(asm_i(OP_ADDI, 25, 0, 0));       // patched: r25 = l_end
    prog.push_back(asm_r(OP_JDI, 25, 1, 2));        // taken
    prog.push_back(asm_i(OP_ADDI, 24, 0, 99));      // squashed
    l_nt = here();
    prog.push_back(asm_i(OP_ADDI, 24, 0, 98));      // squashed
    prog.push_back(asm_i(OP_ADDI, 24, 0, 97));      // squashed
    l_end = here();
    prog.push_back(asm_i(OP_JUMP, 0, 0, 0));        // patched: stay here
    prog[l_jump / 4]   = asm_i(OP_JUMP, 20, 0, l_after);
    prog[l_after / 4 + 1] = asm_i(OP_ADDI, 22, 0, l_eq);
    prog[l_eq / 4 + 3] = asm_i(OP_ADDI, 25, 0, l_end);
    prog[l_end / 4]    = asm_i(OP_JUMP, 0, 0, l_end);

    foreach (prog[i]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = i; prog_data = prog[i];
    end
    @(negedge clk) prog_we = 0;
    for (int i = prog.size(); i < 256; i++) dut.u_imem.mem[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (pc_if == l_end);
    repeat (10) @(posedge clk);
    #1;
    chk(dut.u_rf.regs[1] == 9 && dut.u_rf.regs[2] == -3 && dut.u_rf.regs[3] == 6, "addi/add");
    chk(dut.u_rf.regs[4] == 54, "mul");
    chk(dut.u_rf.regs[5] == 'h136 && dut.u_rf.regs[6] == ~32'h136, "ori/not");
    chk(dut.u_dmem.mem[20] == 54 && dut.u_rf.regs[7] == 54, "store/load");
    chk(dut.u_rf.regs[8] == 108, "load-use");
    chk(dut.u_rf.regs[9] == 'h32 && dut.u_rf.regs[10] == 'h33, "read status, read-use");
    chk(dut.u_rf.regs[11] == 'h8000, "mul 128*256");
    chk(dut.u_rf.regs[13] == {16'hBEEF, 8'd0, 8'd37}, "read packet word buffer 0");
    chk(dut.u_rf.regs[14] == {16'hBEEF, 5'd0, 3'd1, 2'd0, 6'd6}, "read packet word buffer 1");
    chk(dut.u_rf.regs[16] == 0, "unmapped read");
    chk(dut.u_rf.regs[20] == l_jump + 4 && dut.u_rf.regs[26] == l_jump + 4, "jump link");
    chk(dut.u_rf.regs[21] == 0 && dut.u_rf.regs[23] == 0, "squashed after jump/jeq");
    chk(dut.u_rf.regs[24] == 7, "jdi not taken, then taken and squashed");
    chk(dut.u_rf.regs[0] == 0, "r0");
    exp_log = '{"st5=33", "pkt0.5=9", "SCH_SEND b2 p3", "SCH_BLOCK b2 p3", "SCH_ERASE b2 p1", "topo=36"};
    chk(log.size() == exp_log.size(), $sformatf("side effect count %0d", log.size()));
    foreach (exp_log[i]) if (i < log.size()) chk(log[i] == exp_log[i], {"side effect ", log[i], " vs ", exp_log[i]});
    chk(topo == 54 && topo_count == 1, "reconfiguration register");
    // timing
    for (int k = 0; k < 8; k++) chk(retire_cyc[k] == 4 + k, $sformatf("instruction %0d retires at clock %0d", k, retire_cyc[k]));
    chk(retire_cyc[8] == 13, "load-use bubble");
    chk(n_stall == 2, $sformatf("stalls %0d", n_stall));
    chk(n_f1 > 0 && n_f2 > 0, "both forwarding paths used");
    $display("retired %0d, stalls %0d, taken jumps %0d, F1 %0d, F2 %0d", retire_cyc.size(), n_stall, n_flush, n_f1, n_f2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
