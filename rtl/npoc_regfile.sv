// npoc_regfile: the NPoC register bank.
//
// Thirty-two 32-bit registers with three combinational read ports (AR1, AR2,
// AR3 of the instruction in ID) and one write port driven from write-back.
// Register 0 always reads as zero, which programs use as a constant source.
// A write and a read of the same register in the same cycle return the new
// value (write-through), so an instruction in ID sees the result of the
// instruction in WB without a forwarding path. Writes take effect on the
// rising clock edge. Reset clears every register.
// The three read ports and the single write port follow the pipeline figure
// of the NPoC; the register count, register 0 and write-through are this
// design's choices.
module npoc_regfile
  import npoc_pkg::*;
#(
  parameter int unsigned NUM_REGS = NREG
) (
  input  logic   clk,
  input  logic   rst_n,
  input  raddr_t ar1,
  input  raddr_t ar2,
  input  raddr_t ar3,
  output word_t  dr1,
  output word_t  dr2,
  output word_t  dr3,
  input  logic   we,
  input  raddr_t wa,
  input  word_t  wd
);

  word_t regs [NUM_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NUM_REGS); i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  function automatic word_t rd(raddr_t a);
    if (a == '0)            return '0;
    else if (we && wa == a) return wd;
    else                    return regs[a];
  endfunction

  assign dr1 = rd(ar1);
  assign dr2 = rd(ar2);
  assign dr3 = rd(ar3);

endmodule
