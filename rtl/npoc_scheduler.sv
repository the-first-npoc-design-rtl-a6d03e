// npoc_scheduler: packet scheduler of the NPoC router.
//
// Keeps the state of every packet slot of every input buffer (free, being
// received, ready, blocked, being sent) and decides which packet each buffer
// sends next. Two kinds of agents change the state:
//  * the processor, through the send, block and erase instructions in the
//    fourth pipeline stage: buffer number r1 (1..NB), packet slot r2 + immed.
//    send makes a blocked packet ready, block holds a ready packet, erase
//    discards a ready or blocked packet. Commands that name a free slot, a
//    slot still being received or being sent, or an out-of-range buffer or
//    slot are ignored.
//  * the buffers' receive and transmit engines, which claim a free slot when a
//    packet starts to arrive (rx_claim), mark it ready when its last word is
//    in (rx_done), claim the oldest ready packet to send (tx_claim) and free
//    it when its last word has crossed the switch (tx_done).
// A packet that arrives is ready at once, so traffic flows without processor
// help; block/send/erase let a program hold, release or drop packets. Ready
// packets of one buffer leave in arrival order (a 16-bit arrival stamp per
// slot). All outputs are functions of the registered state. The document
// names the scheduler and the three instructions; the states, the default of
// "ready on arrival" and the oldest-first rule are this design's choices.
module npoc_scheduler
  import npoc_pkg::*;
#(
  parameter int unsigned NB = 8,
  parameter int unsigned NP = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // processor commands
  input  sch_cmd_e              cmd,
  input  word_t                 cmd_buf,   // buffer number, 1..NB
  input  word_t                 cmd_pkt,   // packet slot, 0..NP-1
  // buffer engines
  output logic [NB-1:0]         free_valid,
  output logic [$clog2(NP)-1:0] free_slot [NB],
  input  logic [NB-1:0]         rx_claim,
  input  logic [NB-1:0]         rx_done,
  input  logic [$clog2(NP)-1:0] rx_slot   [NB],
  output logic [NB-1:0]         tx_avail,
  output logic [$clog2(NP)-1:0] tx_slot   [NB],
  input  logic [NB-1:0]         tx_claim,
  input  logic [NB-1:0]         tx_done,
  input  logic [$clog2(NP)-1:0] tx_cur    [NB],
  output logic [NB-1:0]         busy,      // a slot is being received or is ready
  // observation
  output pkt_state_e            state     [NB][NP]
);

  localparam int unsigned SW = $clog2(NP);

  logic [15:0] stamp   [NB][NP];
  logic [15:0] arrival [NB];

  // Decoded processor command.
  logic          cmd_ok;
  logic [SW-1:0] cmd_slot;
  int unsigned   cmd_b;

  always_comb begin
    cmd_b    = 0;
    cmd_slot = '0;
    cmd_ok   = (cmd != SCH_NONE) && (cmd_buf >= 1) && (cmd_buf <= NB) && (cmd_pkt < NP);
    if (cmd_ok) begin
      cmd_b    = int'(cmd_buf) - 1;
      cmd_slot = cmd_pkt[SW-1:0];
    end
  end

  // Per-buffer selection from the registered state.
  always_comb begin
    for (int b = 0; b < int'(NB); b++) begin
      free_valid[b] = 1'b0;
      free_slot[b]  = '0;
      tx_avail[b]   = 1'b0;
      tx_slot[b]    = '0;
      busy[b]       = 1'b0;
      for (int s = int'(NP) - 1; s >= 0; s--) begin
        if (state[b][s] == PKT_FREE) begin
          free_valid[b] = 1'b1;
          free_slot[b]  = SW'(s);
        end
        if (state[b][s] == PKT_RX || state[b][s] == PKT_READY) busy[b] = 1'b1;
      end
      for (int s = 0; s < int'(NP); s++) begin
        if (state[b][s] == PKT_READY &&
            (!tx_avail[b] || $signed(stamp[b][s] - stamp[b][tx_slot[b]]) < 0)) begin
          tx_avail[b] = 1'b1;
          tx_slot[b]  = SW'(s);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < int'(NB); b++) begin
        arrival[b] <= '0;
        for (int s = 0; s < int'(NP); s++) begin
          state[b][s] <= PKT_FREE;
          stamp[b][s] <= '0;
        end
      end
    end else begin
      // Processor commands act only on ready or blocked packets; the engines
      // act only on free, receiving or sending slots, so they never collide.
      if (cmd_ok) begin
        unique case (cmd)
          SCH_SEND:  if (state[cmd_b][cmd_slot] == PKT_BLOCKED)
                       state[cmd_b][cmd_slot] <= PKT_READY;
          SCH_BLOCK: if (state[cmd_b][cmd_slot] == PKT_READY)
                       state[cmd_b][cmd_slot] <= PKT_BLOCKED;
          SCH_ERASE: if (state[cmd_b][cmd_slot] == PKT_READY ||
                         state[cmd_b][cmd_slot] == PKT_BLOCKED)
                       state[cmd_b][cmd_slot] <= PKT_FREE;
          default: ;
        endcase
      end
      for (int b = 0; b < int'(NB); b++) begin
        if (rx_claim[b]) state[b][free_slot[b]] <= PKT_RX;
        if (rx_done[b]) begin
          state[b][rx_slot[b]] <= PKT_READY;
          stamp[b][rx_slot[b]] <= arrival[b];
          arrival[b]           <= arrival[b] + 1'b1;
        end
        if (tx_done[b])  state[b][tx_cur[b]]  <= PKT_FREE;
        if (tx_claim[b]) state[b][tx_slot[b]] <= PKT_TX;
      end
    end
  end

endmodule
