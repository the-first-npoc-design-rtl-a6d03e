// npoc_rcs: the reconfigurable crossbar switch (RCS) that links the router's
// NPORTS ports.
//
// An NPORTS x NPORTS grid of switching nodes: node (r, c) closed connects
// input c to output r. The node settings come from the topology word in the
// reconfiguration register (one bit per pair of ports, see npoc_pkg); each
// bit closes the two nodes (i,j) and (j,i), so every link is bidirectional
// and the diagonal stays open. The nodes copy the register on every clock, so
// a new topology is in force two clocks after reconf writes the register.
//
// Data: an input that is sending broadcasts its word to every output it is
// connected to. An output shared by several sending inputs serves the lowest
// numbered one. An input advances (in_grant) only in a cycle in which it holds
// all of its outputs, so every neighbour receives every word, in order. The
// lowest numbered sending input always holds all its outputs, so the switch
// never deadlocks. An input with no closed node waits. out_src tells which
// input an output carries.
// The grid of switching nodes, the eight ports and the two-cycle
// reconfiguration follow the document; the bit encoding of the topology word
// and the arbitration are this design's choices. NPORTS*(NPORTS-1)/2 must not
// exceed 32.
module npoc_rcs
  import npoc_pkg::*;
#(
  parameter int unsigned NPORTS = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  word_t                     topo,
  input  logic [NPORTS-1:0]         in_valid,
  input  word_t                     in_data  [NPORTS],
  output logic [NPORTS-1:0]         in_grant,
  output logic [NPORTS-1:0]         out_valid,
  output word_t                     out_data [NPORTS],
  output logic [$clog2(NPORTS)-1:0] out_src  [NPORTS],
  output logic [NPORTS-1:0]         node     [NPORTS]   // node[r][c]: input c -> output r
);

  localparam int unsigned PW_ = $clog2(NPORTS);

  initial assert (NPORTS * (NPORTS - 1) / 2 <= XLEN)
    else $error("npoc_rcs: %0d ports need more than one topology word", NPORTS);

  function automatic logic link(int unsigned r, int unsigned c);
    if (r == c) return 1'b0;
    return topo[pair_bit(r, c, NPORTS)];
  endfunction

  // Switching nodes: second of the two reconfiguration clocks.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(NPORTS); r++) node[r] <= '0;
    end else begin
      for (int r = 0; r < int'(NPORTS); r++)
        for (int c = 0; c < int'(NPORTS); c++)
          node[r][c] <= link(r, c);
    end
  end

  logic [NPORTS-1:0] has_win;
  logic [PW_-1:0]    win [NPORTS];

  always_comb begin
    // Per output: lowest numbered connected input that is sending.
    for (int r = 0; r < int'(NPORTS); r++) begin
      has_win[r] = 1'b0;
      win[r]     = '0;
      for (int c = int'(NPORTS) - 1; c >= 0; c--) begin
        if (node[r][c] && in_valid[c]) begin
          has_win[r] = 1'b1;
          win[r]     = PW_'(c);
        end
      end
    end
    // Per input: granted when it wins every output it is connected to.
    for (int c = 0; c < int'(NPORTS); c++) begin
      logic any;
      any         = 1'b0;
      in_grant[c] = in_valid[c];
      for (int r = 0; r < int'(NPORTS); r++) begin
        if (node[r][c]) begin
          any = 1'b1;
          if (win[r] != PW_'(c)) in_grant[c] = 1'b0;
        end
      end
      if (!any) in_grant[c] = 1'b0;
    end
    for (int r = 0; r < int'(NPORTS); r++) begin
      out_valid[r] = has_win[r] && in_grant[win[r]];
      out_data[r]  = in_data[win[r]];
      out_src[r]   = win[r];
    end
  end

endmodule
