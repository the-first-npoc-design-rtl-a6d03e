// npoc_cpu: the NPoC processor, a five-stage scalar RISC pipeline whose fourth
// stage reaches the router.
//
// Stages, one clock each:
//   IF   PC indexes the instruction memory; PC+4 goes along.
//   ID   control unit, register bank (three reads), sign extension of the
//        12-bit immediate to 32 bits.
//   EX   forwarding multiplexers (c1, c2, c3) and the ALU, which also decides
//        the jump (J).
//   4th  one of: data memory (load/store), BCTU (read/write of buffer words
//        and status), scheduler (send/block/erase), reconfiguration register
//        (reconf). Taken jumps are carried out here: the PC is loaded from
//        EX/ME (target r2+immed for jump, r1 for jeq/jdi) and the three
//        younger instructions in IF, ID and EX are squashed.
//   WB   r1 is written with the ALU result, the loaded word, the BCTU word or,
//        for jump, the return address (PC+4 of the jump).
// Results are forwarded from EX/ME (F1) and ME/WB (F2); the register bank
// writes through, covering WB to ID. A load or read followed at once by an
// instruction that uses its result holds IF and ID for one cycle. So: one
// instruction per cycle, five cycles from fetch to write-back, one bubble per
// load-use pair and three per taken jump.
// Follows the document: the five stages and their units, the instruction
// set, the forwarding paths F1/F2 and the 12-to-32-bit immediate. This
// design's choices: the encoding (npoc_pkg), where jumps resolve and how
// they squash, the load-use interlock and the memory load ports.
module npoc_cpu
  import npoc_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_DEPTH = 1024,
  parameter int unsigned NB         = 8,
  parameter int unsigned NP         = 4,
  parameter int unsigned PW         = 128,
  parameter int unsigned NPORTS     = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // program and data loading
  input  logic                     prog_we,
  input  word_t                    prog_addr,
  input  word_t                    prog_data,
  input  logic                     dload_we,
  input  word_t                    dload_addr,
  input  word_t                    dload_data,
  // BCTU to the input buffers
  output logic [$clog2(NB)-1:0]    pkt_buf,
  output logic [$clog2(NP*PW)-1:0] pkt_off,
  output logic                     pkt_we,
  output word_t                    pkt_wdata,
  input  word_t                    pkt_rdata,
  output logic [NB-1:0]            st_we,
  output word_t                    st_wdata,
  input  word_t                    st_q [NB],
  input  logic [NPORTS-1:0]        xbar_rows [NPORTS],
  // scheduler
  output sch_cmd_e                 sch_cmd,
  output word_t                    sch_buf,
  output word_t                    sch_pkt,
  // reconfiguration register
  output word_t                    topo,
  output logic                     topo_updated,
  output word_t                    topo_count,
  // events, one pulse per occurrence
  output logic                     ev_retire,
  output logic                     ev_stall,
  output logic                     ev_flush,
  output logic                     ev_fwd_f1,
  output logic                     ev_fwd_f2,
  output word_t                    pc_if
);

  // ---------------- pipeline registers ----------------
  word_t  pc;
  instr_t ifid_ins;
  word_t  ifid_pc4;
  logic   ifid_v;

  ctrl_t  idex_c;
  raddr_t idex_ar1, idex_ar2, idex_ar3;
  word_t  idex_dr1, idex_dr2, idex_dr3, idex_imm, idex_pc4;
  logic   idex_v;

  ctrl_t  exme_c;
  raddr_t exme_ar1;
  word_t  exme_alu, exme_dr1, exme_pc4;
  logic   exme_j, exme_v;

  logic   mewb_we, mewb_v;
  raddr_t mewb_ar1;
  word_t  mewb_data;

  // ---------------- IF ----------------
  word_t inst;
  npoc_imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .pc, .inst, .prog_we, .prog_addr, .prog_data);
  assign pc_if = pc;

  // ---------------- ID ----------------
  ctrl_t id_c;
  word_t id_dr1, id_dr2, id_dr3, id_imm;
  npoc_control u_ctrl (.ins(ifid_ins), .ctrl(id_c));
  npoc_regfile u_rf (
    .clk, .rst_n,
    .ar1(ifid_ins.r1), .ar2(ifid_ins.r2), .ar3(ifid_ins.r3),
    .dr1(id_dr1), .dr2(id_dr2), .dr3(id_dr3),
    .we(mewb_we), .wa(mewb_ar1), .wd(mewb_data));
  assign id_imm = word_t'($signed(ifid_ins.imm));

  // Load-use interlock: the value of a load/read is known only after the
  // fourth stage.
  logic stall, flush;
  always_comb begin
    stall = 1'b0;
    if (idex_v && idex_c.reg_write && (idex_c.dmem_read || idex_c.bctu_read) && ifid_v) begin
      if ((id_c.use_r1 && ifid_ins.r1 == idex_ar1) ||
          (id_c.use_r2 && ifid_ins.r2 == idex_ar1) ||
          (id_c.use_r3 && ifid_ins.r3 == idex_ar1))
        stall = 1'b1;
    end
  end

  // ---------------- EX ----------------
  fwd_e  c1, c2, c3;
  word_t f1, f2, op1, op2, op3, alu_b, alu_res;
  logic  alu_j;

  npoc_forwarding u_fwd (
    .ar1(idex_ar1), .ar2(idex_ar2), .ar3(idex_ar3),
    .exme_we(exme_v && exme_c.reg_write),
    .exme_from_alu(exme_c.wb_sel inside {WB_ALU, WB_LINK}),
    .ar1a(exme_ar1),
    .mewb_we(mewb_v && mewb_we), .ar1b(mewb_ar1),
    .c1, .c2, .c3);

  assign f1 = (exme_c.wb_sel == WB_LINK) ? exme_pc4 : exme_alu;
  assign f2 = mewb_data;

  function automatic word_t fmux(fwd_e c, word_t r, word_t a, word_t b);
    unique case (c)
      FWD_F1:  return a;
      FWD_F2:  return b;
      default: return r;
    endcase
  endfunction

  assign op1   = fmux(c3, idex_dr1, f1, f2);
  assign op2   = fmux(c2, idex_dr2, f1, f2);
  assign op3   = fmux(c1, idex_dr3, f1, f2);
  assign alu_b = idex_c.b_imm ? idex_imm : op3;

  npoc_alu u_alu (
    .op(idex_c.alu_op), .jmp(idex_c.jmp), .a(op2), .b(alu_b), .res(alu_res), .j(alu_j));

  // ---------------- fourth stage ----------------
  word_t dmem_q, bctu_q, mem_res;

  npoc_dmem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk,
    .re(exme_v && exme_c.dmem_read), .we(exme_v && exme_c.dmem_write),
    .addr(exme_alu), .wdata(exme_dr1), .rdata(dmem_q),
    .load_we(dload_we), .load_addr(dload_addr), .load_data(dload_data));

  npoc_bctu #(.NB(NB), .NP(NP), .PW(PW), .NPORTS(NPORTS)) u_bctu (
    .rd(exme_v && exme_c.bctu_read), .wr(exme_v && exme_c.bctu_write),
    .addr(exme_alu), .wdata(exme_dr1), .rdata(bctu_q),
    .pkt_buf, .pkt_off, .pkt_we, .pkt_wdata, .pkt_rdata,
    .st_we, .st_wdata, .st_q, .xbar_rows);

  assign sch_cmd = exme_v ? exme_c.sch_cmd : SCH_NONE;
  assign sch_buf = exme_dr1;
  assign sch_pkt = exme_alu;

  npoc_reconf_reg u_rec (
    .clk, .rst_n, .we(exme_v && exme_c.rec_write), .wdata(exme_dr1),
    .topo, .updated(topo_updated), .count(topo_count));

  always_comb begin
    unique case (exme_c.wb_sel)
      WB_DMEM: mem_res = dmem_q;
      WB_BCTU: mem_res = bctu_q;
      WB_LINK: mem_res = exme_pc4;
      default: mem_res = exme_alu;
    endcase
  end

  assign flush = exme_v && exme_j;

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc        <= '0;
      ifid_ins  <= '0;
      ifid_pc4  <= '0;
      ifid_v    <= 1'b0;
      idex_c    <= CTRL_NOP;
      idex_ar1  <= '0; idex_ar2 <= '0; idex_ar3 <= '0;
      idex_dr1  <= '0; idex_dr2 <= '0; idex_dr3 <= '0;
      idex_imm  <= '0; idex_pc4 <= '0;
      idex_v    <= 1'b0;
      exme_c    <= CTRL_NOP;
      exme_ar1  <= '0;
      exme_alu  <= '0; exme_dr1 <= '0; exme_pc4 <= '0;
      exme_j    <= 1'b0;
      exme_v    <= 1'b0;
      mewb_we   <= 1'b0;
      mewb_v    <= 1'b0;
      mewb_ar1  <= '0;
      mewb_data <= '0;
    end else begin
      // PC and IF/ID
      if (flush) begin
        pc       <= (exme_c.jmp == JMP_ALWAYS) ? exme_alu : exme_dr1;
        ifid_ins <= '0;
        ifid_v   <= 1'b0;
      end else if (!stall) begin
        pc       <= pc + 32'd4;
        ifid_ins <= instr_t'(inst);
        ifid_pc4 <= pc + 32'd4;
        ifid_v   <= 1'b1;
      end
      // ID/EX
      if (flush || stall || !ifid_v) begin
        idex_c <= CTRL_NOP;
        idex_v <= 1'b0;
      end else begin
        idex_c <= id_c;
        idex_v <= 1'b1;
      end
      idex_ar1 <= ifid_ins.r1; idex_ar2 <= ifid_ins.r2; idex_ar3 <= ifid_ins.r3;
      idex_dr1 <= id_dr1; idex_dr2 <= id_dr2; idex_dr3 <= id_dr3;
      idex_imm <= id_imm; idex_pc4 <= ifid_pc4;
      // EX/ME
      if (flush || !idex_v) begin
        exme_c <= CTRL_NOP;
        exme_v <= 1'b0;
        exme_j <= 1'b0;
      end else begin
        exme_c <= idex_c;
        exme_v <= 1'b1;
        exme_j <= alu_j;
      end
      exme_ar1 <= idex_ar1;
      exme_alu <= alu_res;
      exme_dr1 <= op1;
      exme_pc4 <= idex_pc4;
      // ME/WB
      mewb_v    <= exme_v;
      mewb_we   <= exme_v && exme_c.reg_write;
      mewb_ar1  <= exme_ar1;
      mewb_data <= mem_res;
    end
  end

  assign ev_retire = mewb_v;
  assign ev_stall  = stall && !flush;
  assign ev_flush  = flush;
  assign ev_fwd_f1 = idex_v && ((idex_c.use_r1 && c3 == FWD_F1) ||
                                (idex_c.use_r2 && c2 == FWD_F1) ||
                                (idex_c.use_r3 && !idex_c.b_imm && c1 == FWD_F1));
  assign ev_fwd_f2 = idex_v && ((idex_c.use_r1 && c3 == FWD_F2) ||
                                (idex_c.use_r2 && c2 == FWD_F2) ||
                                (idex_c.use_r3 && !idex_c.b_imm && c1 == FWD_F2));

endmodule
