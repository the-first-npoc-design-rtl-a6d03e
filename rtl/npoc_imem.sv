// npoc_imem: the NPoC instruction memory.
//
// DEPTH 32-bit words, read combinationally in IF at the byte address PC (word
// PC/4), so an instruction reaches IF/ID in the cycle it is fetched. A
// synchronous write port loads the program (used before the processor is
// released from reset). Addresses beyond DEPTH read as zero, which decodes as
// no operation. The depth and the load port are this design's choices.
module npoc_imem
  import npoc_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic  clk,
  input  word_t pc,
  output word_t inst,
  input  logic  prog_we,
  input  word_t prog_addr,   // word address
  input  word_t prog_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (prog_we && prog_addr < DEPTH) mem[prog_addr[AW-1:0]] <= prog_data;
  end

  word_t widx;
  assign widx = pc >> 2;
  assign inst = (widx < DEPTH) ? mem[widx[AW-1:0]] : '0;

endmodule
