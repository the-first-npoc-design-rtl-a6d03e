// npoc_bctu: Buffer and Crossbar Transfer Unit of the NPoC.
//
// Sits in the fourth pipeline stage and serves the read and write network
// instructions. It decodes the word address r2 + immed computed by the ALU:
//   1 .. NB                         communication status register of buffer
//                                   1..NB (reg_buffer[i] of the management
//                                   program), read and write
//   XBAR_BASE + r, r < NPORTS       row r of the switching-node matrix that
//                                   the crossbar is using (bit c set: input c
//                                   drives output r), read only
//   PKT_BASE + {buffer-1, packet, word}   one 32-bit word of a stored packet,
//                                   read and write
// Other addresses read as zero and ignore writes. Reads are combinational so
// the result (Dbctu) is written into ME/WB in the same cycle. The document
// gives the unit's role (instructions reach the buffers and the crossbar
// through it); the address map is this design's choice. NP and PW must be
// powers of two.
module npoc_bctu
  import npoc_pkg::*;
#(
  parameter int unsigned NB     = 8,    // input buffers
  parameter int unsigned NP     = 4,    // packet slots per buffer
  parameter int unsigned PW     = 128,  // 32-bit words per packet
  parameter int unsigned NPORTS = 8     // crossbar ports
) (
  // from the fourth pipeline stage
  input  logic  rd,
  input  logic  wr,
  input  word_t addr,
  input  word_t wdata,
  output word_t rdata,
  // packet storage
  output logic [$clog2(NB)-1:0]    pkt_buf,
  output logic [$clog2(NP*PW)-1:0] pkt_off,
  output logic                     pkt_we,
  output word_t                    pkt_wdata,
  input  word_t                    pkt_rdata,
  // communication status registers
  output logic [NB-1:0]            st_we,
  output word_t                    st_wdata,
  input  word_t                    st_q [NB],
  // crossbar switching nodes
  input  logic [NPORTS-1:0]        xbar_rows [NPORTS]
);

  localparam word_t XBAR_BASE = 32'h0000_4000;
  localparam int unsigned OFFW = $clog2(NP*PW);
  localparam int unsigned BUFW = $clog2(NB);

  word_t pkt_rel, xbar_rel;
  logic  in_pkt, in_st, in_xbar;

  always_comb begin
    pkt_rel  = addr - BCTU_PKT_BASE;
    xbar_rel = addr - XBAR_BASE;
    in_pkt   = (addr >= BCTU_PKT_BASE) && (pkt_rel < NB * NP * PW);
    in_st    = (addr >= 1) && (addr <= NB);
    in_xbar  = (addr >= XBAR_BASE) && (xbar_rel < NPORTS);

    pkt_off   = pkt_rel[OFFW-1:0];
    pkt_buf   = pkt_rel[OFFW +: BUFW];
    pkt_we    = wr && in_pkt;
    pkt_wdata = wdata;

    st_wdata = wdata;
    st_we    = '0;
    if (wr && in_st) st_we[addr - 1] = 1'b1;
  end

  // Read multiplexer, kept apart from the decoder so that the path from the
  // offset to the storage and back is not seen as a loop.
  always_comb begin
    rdata = '0;
    if (rd) begin
      if (in_pkt)       rdata = pkt_rdata;
      else if (in_st)   rdata = st_q[addr - 1];
      else if (in_xbar) rdata = word_t'(xbar_rows[xbar_rel]);
    end
  end

endmodule
