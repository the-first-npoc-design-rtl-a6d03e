// npoc_input_buffers: the input buffers of the NPoC router.
//
// One buffer per crossbar port. Each buffer stores NP packets of PW 32-bit
// words (default 4096-bit packets) and has three users:
//  * a receive engine that takes one word per cycle from the attached core
//    (rx_valid/rx_data, accepted when rx_ready) into a free slot given by the
//    scheduler; a packet is always PW words long;
//  * a transmit engine that sends the packet the scheduler picks, one word
//    per cycle, into the crossbar input (tx_valid/tx_data), advancing when the
//    crossbar grants it; a next packet follows without a gap;
//  * the BCTU, which reads and writes any stored word and the buffer's
//    communication status register.
// The status register (reg_buffer of the management program) is set to 1 by
// the hardware when the buffer has sent a packet and holds no other packet
// that is ready or arriving, i.e. when its traffic is over. Software clears it
// by writing it through the BCTU; a hardware set in the same cycle wins.
// The document gives the buffers' role and the status that the program polls;
// slot count, the engines and the exact "traffic over" condition are this
// design's choices. NP and PW must be powers of two, NP at least 2.
module npoc_input_buffers
  import npoc_pkg::*;
#(
  parameter int unsigned NB = 8,
  parameter int unsigned NP = 4,
  parameter int unsigned PW = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // cores
  input  logic [NB-1:0]            rx_valid,
  input  word_t                    rx_data  [NB],
  output logic [NB-1:0]            rx_ready,
  // scheduler
  input  logic [NB-1:0]            free_valid,
  input  logic [$clog2(NP)-1:0]    free_slot [NB],
  output logic [NB-1:0]            rx_claim,
  output logic [NB-1:0]            rx_done,
  output logic [$clog2(NP)-1:0]    rx_slot   [NB],
  input  logic [NB-1:0]            tx_avail,
  input  logic [$clog2(NP)-1:0]    tx_slot   [NB],
  output logic [NB-1:0]            tx_claim,
  output logic [NB-1:0]            tx_done,
  output logic [$clog2(NP)-1:0]    tx_cur    [NB],
  input  logic [NB-1:0]            busy,
  // crossbar inputs
  output logic [NB-1:0]            tx_valid,
  output word_t                    tx_data   [NB],
  input  logic [NB-1:0]            tx_grant,
  // BCTU
  input  logic [$clog2(NB)-1:0]    bctu_buf,
  input  logic [$clog2(NP*PW)-1:0] bctu_off,
  input  logic                     bctu_we,
  input  word_t                    bctu_wdata,
  output word_t                    bctu_rdata,
  input  logic [NB-1:0]            st_we,
  input  word_t                    st_wdata,
  output word_t                    st_q      [NB],
  output logic [NB-1:0]            done_evt  // traffic-over event (status set)
);

  localparam int unsigned SW   = $clog2(NP);
  localparam int unsigned WW   = $clog2(PW);

  word_t bctu_rd [NB];

  for (genvar b = 0; b < NB; b++) begin : g_buf
    word_t         mem [NP*PW];
    logic          rx_act, tx_act;
    logic [WW-1:0] rx_cnt, tx_cnt;
    logic [SW-1:0] rx_s, tx_s;
    logic          rx_fire, tx_fire, tx_last;

    // Receive engine: the first word claims the free slot.
    assign rx_ready[b] = rx_act || free_valid[b];
    assign rx_fire     = rx_valid[b] && rx_ready[b];
    assign rx_claim[b] = rx_fire && !rx_act;
    assign rx_done[b]  = rx_fire && rx_act && (rx_cnt == WW'(PW - 1));
    assign rx_slot[b]  = rx_s;

    // Transmit engine.
    assign tx_valid[b] = tx_act;
    assign tx_cur[b]   = tx_s;
    assign tx_data[b]  = mem[{tx_s, tx_cnt}];
    assign tx_fire     = tx_act && tx_grant[b];
    assign tx_last     = tx_fire && (tx_cnt == WW'(PW - 1));
    assign tx_done[b]  = tx_last;
    assign tx_claim[b] = (!tx_act || tx_last) && tx_avail[b];
    assign done_evt[b] = tx_last && !busy[b];

    assign bctu_rd[b] = mem[bctu_off];

    always_ff @(posedge clk) begin
      if (rx_fire) mem[{(rx_act ? rx_s : free_slot[b]), (rx_act ? rx_cnt : WW'(0))}] <= rx_data[b];
      if (bctu_we && bctu_buf == $clog2(NB)'(b)) mem[bctu_off] <= bctu_wdata;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rx_act <= 1'b0;
        rx_cnt <= '0;
        rx_s   <= '0;
        tx_act <= 1'b0;
        tx_cnt <= '0;
        tx_s   <= '0;
        st_q[b] <= '0;
      end else begin
        if (rx_claim[b]) begin
          rx_act <= 1'b1;
          rx_s   <= free_slot[b];
          rx_cnt <= WW'(1);
        end else if (rx_fire) begin
          rx_cnt <= rx_cnt + 1'b1;
          if (rx_done[b]) rx_act <= 1'b0;
        end

        if (tx_claim[b]) begin
          tx_act <= 1'b1;
          tx_s   <= tx_slot[b];
          tx_cnt <= '0;
        end else if (tx_last) begin
          tx_act <= 1'b0;
        end else if (tx_fire) begin
          tx_cnt <= tx_cnt + 1'b1;
        end

        if (done_evt[b])   st_q[b] <= 32'd1;
        else if (st_we[b]) st_q[b] <= st_wdata;
      end
    end
  end

  assign bctu_rdata = bctu_rd[bctu_buf];

endmodule
