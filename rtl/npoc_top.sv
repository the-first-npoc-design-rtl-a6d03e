// npoc_top: a network-on-chip router managed by the NPoC network processor.
//
// NPORTS cores attach to the router. Each core writes fixed-size packets into
// its input buffer (rx_*); the scheduler marks them ready and the buffer
// streams them, one 32-bit word per clock, into the reconfigurable crossbar
// switch, which broadcasts each word to every port linked to the sender in
// the current topology (out_*). The NPoC processor runs a program that polls
// the buffers' communication status through its BCTU, manages packets through
// the scheduler and, when a communication pattern is over, writes the next
// topology word into its reconfiguration register; the crossbar's switching
// nodes follow two clocks later.
//
// Interface: the program is loaded into the instruction memory (prog_*) and
// data such as topology words into the data memory (dload_*) while rst_n is
// low; the processor starts at address 0 when rst_n rises. Event outputs
// (ev_*) pulse once per occurrence for monitoring.
// The structure (processor, input buffers, scheduler, crossbar) follows the
// document; port numbering here is 0-based, while program-visible buffer
// numbers are 1..NPORTS as in the document's management algorithm.
module npoc_top
  import npoc_pkg::*;
#(
  parameter int unsigned NPORTS     = 8,
  parameter int unsigned NP         = 4,
  parameter int unsigned PW         = 128,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_DEPTH = 1024
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      prog_we,
  input  word_t                     prog_addr,
  input  word_t                     prog_data,
  input  logic                      dload_we,
  input  word_t                     dload_addr,
  input  word_t                     dload_data,
  // cores to input buffers
  input  logic [NPORTS-1:0]         rx_valid,
  input  word_t                     rx_data   [NPORTS],
  output logic [NPORTS-1:0]         rx_ready,
  // crossbar outputs to cores
  output logic [NPORTS-1:0]         out_valid,
  output word_t                     out_data  [NPORTS],
  output logic [$clog2(NPORTS)-1:0] out_src   [NPORTS],
  // observation
  output word_t                     topo,
  output word_t                     reconf_count,
  output logic [NPORTS-1:0]         node      [NPORTS],
  output logic                      ev_retire,
  output logic                      ev_stall,
  output logic                      ev_flush,
  output logic                      ev_fwd_f1,
  output logic                      ev_fwd_f2,
  output logic                      ev_reconf,
  output logic [NPORTS-1:0]         ev_pkt_sent,
  output logic [NPORTS-1:0]         ev_done,
  output logic [NPORTS-1:0]         ev_rx_stall,
  output logic [NPORTS-1:0]         ev_tx_wait,
  output logic [NPORTS-1:0]         ev_blocked_slot,
  output word_t                     pc_if
);

  localparam int unsigned NB = NPORTS;
  localparam int unsigned SW = $clog2(NP);

  logic [$clog2(NB)-1:0]    pkt_buf;
  logic [$clog2(NP*PW)-1:0] pkt_off;
  logic                     pkt_we;
  word_t                    pkt_wdata, pkt_rdata, st_wdata;
  logic [NB-1:0]            st_we;
  word_t                    st_q [NB];
  sch_cmd_e                 sch_cmd;
  word_t                    sch_buf, sch_pkt;
  logic                     topo_updated;

  logic [NB-1:0] free_valid, rx_claim, rx_done, tx_avail, tx_claim, tx_done, busy;
  logic [SW-1:0] free_slot [NB], rx_slot [NB], tx_slot [NB], tx_cur [NB];
  logic [NB-1:0] tx_valid, tx_grant;
  word_t         tx_data [NB];
  pkt_state_e    state [NB][NP];

  npoc_cpu #(
    .IMEM_DEPTH(IMEM_DEPTH), .DMEM_DEPTH(DMEM_DEPTH),
    .NB(NB), .NP(NP), .PW(PW), .NPORTS(NPORTS)
  ) u_cpu (
    .clk, .rst_n,
    .prog_we, .prog_addr, .prog_data, .dload_we, .dload_addr, .dload_data,
    .pkt_buf, .pkt_off, .pkt_we, .pkt_wdata, .pkt_rdata,
    .st_we, .st_wdata, .st_q, .xbar_rows(node),
    .sch_cmd, .sch_buf, .sch_pkt,
    .topo, .topo_updated, .topo_count(reconf_count),
    .ev_retire, .ev_stall, .ev_flush, .ev_fwd_f1, .ev_fwd_f2, .pc_if);

  npoc_scheduler #(.NB(NB), .NP(NP)) u_sch (
    .clk, .rst_n,
    .cmd(sch_cmd), .cmd_buf(sch_buf), .cmd_pkt(sch_pkt),
    .free_valid, .free_slot, .rx_claim, .rx_done, .rx_slot,
    .tx_avail, .tx_slot, .tx_claim, .tx_done, .tx_cur, .busy, .state);

  npoc_input_buffers #(.NB(NB), .NP(NP), .PW(PW)) u_buf (
    .clk, .rst_n,
    .rx_valid, .rx_data, .rx_ready,
    .free_valid, .free_slot, .rx_claim, .rx_done, .rx_slot,
    .tx_avail, .tx_slot, .tx_claim, .tx_done, .tx_cur, .busy,
    .tx_valid, .tx_data, .tx_grant,
    .bctu_buf(pkt_buf), .bctu_off(pkt_off), .bctu_we(pkt_we),
    .bctu_wdata(pkt_wdata), .bctu_rdata(pkt_rdata),
    .st_we, .st_wdata, .st_q, .done_evt(ev_done));

  npoc_rcs #(.NPORTS(NPORTS)) u_rcs (
    .clk, .rst_n, .topo,
    .in_valid(tx_valid), .in_data(tx_data), .in_grant(tx_grant),
    .out_valid, .out_data, .out_src, .node);

  assign ev_reconf   = topo_updated;
  assign ev_pkt_sent = tx_done;
  assign ev_rx_stall = rx_valid & ~rx_ready;
  assign ev_tx_wait  = tx_valid & ~tx_grant;
  always_comb begin
    for (int b = 0; b < int'(NB); b++) begin
      ev_blocked_slot[b] = 1'b0;
      for (int s = 0; s < int'(NP); s++)
        if (state[b][s] == PKT_BLOCKED) ev_blocked_slot[b] = 1'b1;
    end
  end

endmodule
