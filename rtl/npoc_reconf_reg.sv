// npoc_reconf_reg: the reconfiguration register of the NPoC.
//
// Holds the topology word that the reconf instruction writes in the fourth
// pipeline stage. Its output drives the switching nodes of the reconfigurable
// crossbar switch, which copy it one clock later, so a new topology is in
// place two clocks after reconf reaches the fourth stage. The register also
// counts reconfigurations and raises `updated` for one cycle after each
// write. Reset clears it, which opens every switching node. The counter and
// the reset value are this design's choices.
module npoc_reconf_reg
  import npoc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  we,
  input  word_t wdata,
  output word_t topo,
  output logic  updated,
  output word_t count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      topo    <= '0;
      updated <= 1'b0;
      count   <= '0;
    end else begin
      updated <= we;
      if (we) begin
        topo  <= wdata;
        count <= count + 1'b1;
      end
    end
  end

endmodule
