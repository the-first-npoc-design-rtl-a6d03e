// npoc_pkg: types and constants shared by the NPoC network processor and its
// router (input buffers, scheduler, reconfigurable crossbar switch).
//
// The processor is a 32-bit, five-stage scalar RISC pipeline with no floating
// point. Instructions are 32 bits wide and carry three register fields and a
// 12-bit immediate that is sign-extended to 32 bits. The opcode values, the
// field positions and the register count (32, register 0 reads as zero) are
// this design's own choice; the instruction set itself (add, mul, addi, ori,
// not, load, store, jump, jeq, jdi, read, write, send, block, erase, reconf)
// follows the NPoC instruction tables.
//
// Instruction word:  [31:27] opcode  [26:22] r1  [21:17] r2  [16:12] r3  [11:0] immed
//
// The crossbar topology word: one bit per unordered pair of ports (i<j),
// numbered row by row over the upper triangle of the connection matrix
// (pair (0,1) is bit 0, (0,2) bit 1, ..., (N-2,N-1) bit N*(N-1)/2-1). A set bit
// closes the two switching nodes (i,j) and (j,i), giving a bidirectional link.
package npoc_pkg;

  localparam int unsigned XLEN  = 32;
  localparam int unsigned NREG  = 32;
  localparam int unsigned RAW   = 5;   // register address width
  localparam int unsigned IMMW  = 12;  // immediate width before sign extension

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RAW-1:0]  raddr_t;

  typedef enum logic [4:0] {
    OP_ADD    = 5'd0,   // r1 = r2 + r3  (all-zero word: add r0,r0,r0 = no operation)
    OP_MUL    = 5'd1,   // r1 = r2 * r3  (low 32 bits)
    OP_ADDI   = 5'd2,   // r1 = r2 + immed
    OP_ORI    = 5'd3,   // r1 = r2 | immed
    OP_NOT    = 5'd4,   // r1 = ~r2
    OP_LOAD   = 5'd5,   // r1 = dmem[r2 + immed]
    OP_STORE  = 5'd6,   // dmem[r2 + immed] = r1
    OP_JUMP   = 5'd7,   // PC = r2 + immed, r1 = return address
    OP_JEQ    = 5'd8,   // PC = r1 if r2 == r3
    OP_JDI    = 5'd9,   // PC = r1 if r2 != r3
    OP_READ   = 5'd10,  // r1 = bctu[r2 + immed]
    OP_WRITE  = 5'd11,  // bctu[r2 + immed] = r1
    OP_SEND   = 5'd12,  // buffer r1, packet r2 + immed: ready to send
    OP_BLOCK  = 5'd13,  // buffer r1, packet r2 + immed: hold
    OP_ERASE  = 5'd14,  // buffer r1, packet r2 + immed: discard
    OP_RECONF = 5'd15   // reconfiguration register = r1
  } opcode_e;

  typedef struct packed {
    opcode_e          op;
    raddr_t           r1;
    raddr_t           r2;
    raddr_t           r3;
    logic [IMMW-1:0]  imm;
  } instr_t;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_MUL, ALU_OR, ALU_NOT, ALU_EQ, ALU_NE
  } alu_op_e;

  // Source of the value written back to r1.
  typedef enum logic [1:0] {
    WB_ALU, WB_DMEM, WB_BCTU, WB_LINK
  } wb_sel_e;

  typedef enum logic [1:0] {
    JMP_NONE, JMP_ALWAYS, JMP_COND
  } jmp_e;

  typedef enum logic [1:0] {
    SCH_NONE, SCH_SEND, SCH_BLOCK, SCH_ERASE
  } sch_cmd_e;

  // Control bits produced in ID and carried down the pipeline.
  typedef struct packed {
    logic     reg_write;
    wb_sel_e  wb_sel;
    alu_op_e  alu_op;
    logic     b_imm;       // ALU operand B is the immediate, not r3
    logic     use_r1;      // r1 is read as a source (store, write, jeq, jdi, send.., reconf)
    logic     use_r2;
    logic     use_r3;
    logic     dmem_read;
    logic     dmem_write;
    logic     bctu_read;
    logic     bctu_write;
    sch_cmd_e sch_cmd;
    logic     rec_write;
    jmp_e     jmp;
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{
    reg_write: 1'b0, wb_sel: WB_ALU, alu_op: ALU_ADD, b_imm: 1'b0,
    use_r1: 1'b0, use_r2: 1'b0, use_r3: 1'b0,
    dmem_read: 1'b0, dmem_write: 1'b0, bctu_read: 1'b0, bctu_write: 1'b0,
    sch_cmd: SCH_NONE, rec_write: 1'b0, jmp: JMP_NONE};

  // Forwarding selection for one operand (c1, c2, c3).
  typedef enum logic [1:0] {
    FWD_REG = 2'd0,   // value read from the register bank in ID
    FWD_F1  = 2'd1,   // result held in EX/ME
    FWD_F2  = 2'd2    // write-back value held in ME/WB
  } fwd_e;

  // Life of one packet slot in an input buffer.
  typedef enum logic [2:0] {
    PKT_FREE    = 3'd0,  // empty
    PKT_RX      = 3'd1,  // being written by the attached core
    PKT_READY   = 3'd2,  // complete, waiting for the crossbar
    PKT_BLOCKED = 3'd3,  // held by a block instruction
    PKT_TX      = 3'd4   // being sent through the crossbar
  } pkt_state_e;

  // BCTU address map (word addresses, computed as r2 + immed):
  //   1 .. NB              communication status register of buffer 1..NB
  //   BCTU_PKT_BASE + off  packet storage, off = {buffer-1, packet, word}
  localparam word_t BCTU_PKT_BASE = 32'h0000_8000;

  // Bit of the topology word that holds the link between ports i and j.
  function automatic int unsigned pair_bit(int unsigned i, int unsigned j, int unsigned n);
    int unsigned a, b;
    a = (i < j) ? i : j;
    b = (i < j) ? j : i;
    return a * (2 * n - a - 1) / 2 + (b - a - 1);
  endfunction

endpackage
