// npoc_dmem: the NPoC data memory, used by load and store in the fourth stage.
//
// DEPTH 32-bit words, word addressed (address r2 + immed selects one word, and
// consecutive words have consecutive addresses). Reads are combinational so
// the loaded value (Dmem) reaches ME/WB in the same cycle; writes happen on
// the rising edge. A second write port lets the data be preloaded from
// outside while the processor is held in reset. Out-of-range reads return
// zero and out-of-range writes are ignored. The depth and the preload port
// are this design's choices.
module npoc_dmem
  import npoc_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic  clk,
  input  logic  re,
  input  logic  we,
  input  word_t addr,
  input  word_t wdata,
  output word_t rdata,
  input  logic  load_we,
  input  word_t load_addr,
  input  word_t load_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_we && load_addr < DEPTH) mem[load_addr[AW-1:0]] <= load_data;
    if (we && addr < DEPTH)           mem[addr[AW-1:0]] <= wdata;
  end

  assign rdata = (re && addr < DEPTH) ? mem[addr[AW-1:0]] : '0;

endmodule
