// npoc_forwarding: the NPoC forwarding unit.
//
// Combinational. For the three source registers of the instruction in EX
// (AR1, AR2, AR3) it compares each with the destination of the instruction in
// EX/ME (AR1a) and in ME/WB (AR1b) and drives the operand multiplexer selects
// c3 (r1), c2 (r2) and c1 (r3): the register-bank value, F1 (the EX/ME
// result) or F2 (the ME/WB write-back value). The younger result, F1, wins.
// A result in EX/ME that comes from the data memory or the BCTU is not ready
// yet; the pipeline stalls one cycle for it (see npoc_cpu), so F1 is only
// chosen for ALU and link results. The paths and select names follow the
// NPoC pipeline figure.
module npoc_forwarding
  import npoc_pkg::*;
(
  input  raddr_t ar1,
  input  raddr_t ar2,
  input  raddr_t ar3,
  input  logic   exme_we,
  input  logic   exme_from_alu,  // EX/ME result is an ALU or link value
  input  raddr_t ar1a,
  input  logic   mewb_we,
  input  raddr_t ar1b,
  output fwd_e   c1,
  output fwd_e   c2,
  output fwd_e   c3
);

  function automatic fwd_e pick(raddr_t src);
    if (src == '0)                                         return FWD_REG;
    else if (exme_we && exme_from_alu && ar1a == src)      return FWD_F1;
    else if (mewb_we && ar1b == src)                       return FWD_F2;
    else                                                   return FWD_REG;
  endfunction

  assign c1 = pick(ar3);
  assign c2 = pick(ar2);
  assign c3 = pick(ar1);

endmodule
