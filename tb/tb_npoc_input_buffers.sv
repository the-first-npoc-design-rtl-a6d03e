// tb_npoc_input_buffers: self-checking test of the input buffers, run with
// the packet scheduler that drives them.
// Four buffers of two 8-word slots. Each core writes numbered packets whose
// words encode (buffer, packet, word) while the crossbar grant is random, so
// buffers fill and the receive side stalls. Checked: every transmitted word
// arrives in order and unchanged; a word rewritten through the BCTU port is
// sent with its new value; the BCTU reads back stored words; the status
// register is set when a buffer's traffic is over and can be cleared; a
// packet follows the previous one without an idle cycle when the grant is
// constant.
module tb_npoc_input_buffers;
  import npoc_pkg::*;
  localparam int NB = 4, NP = 2, PW = 8, PKTS = 40;
  logic clk = 0, rst_n = 0;
  logic [NB-1:0] rx_valid, rx_ready, free_valid, rx_claim, rx_done, tx_avail, tx_claim, tx_done, busy;
  logic [NB-1:0] tx_valid, tx_grant, st_we, done_evt;
  word_t rx_data [NB], tx_data [NB], st_q [NB];
  logic [0:0] free_slot [NB], rx_slot [NB], tx_slot [NB], tx_cur [NB];
  logic [1:0] bctu_buf;
  logic [3:0] bctu_off;
  logic bctu_we;
  word_t bctu_wdata, bctu_rdata, st_wdata;
  pkt_state_e state [NB][NP];
  int checks = 0, failures = 0;
  int n_rx_stall = 0, n_done = 0, tx_checks = 0, tx_fail = 0;
  logic hold1 = 1;

  npoc_input_buffers #(.NB(NB), .NP(NP), .PW(PW)) dut (.*);
  npoc_scheduler #(.NB(NB), .NP(NP)) u_sch (
    .clk, .rst_n, .cmd(SCH_NONE), .cmd_buf(32'd0), .cmd_pkt(32'd0),
    .free_valid, .free_slot, .rx_claim, .rx_done, .rx_slot,
    .tx_avail, .tx_slot, .tx_claim, .tx_done, .tx_cur, .busy, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic word_t wv(int b, int p, int w);
    return {8'hA0 + 8'(b), 8'(p), 16'(w)};
  endfunction

  int rx_p [NB], rx_w [NB], tx_p [NB], tx_w [NB];
  logic grant_random = 1;
  logic patched = 0;

  // Cores: write packets back to back.
  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < NB; b++) begin
      if (rx_valid[b] && rx_ready[b]) begin
        if (rx_w[b] == PW - 1) begin rx_w[b] <= 0; rx_p[b] <= rx_p[b] + 1; end
        else rx_w[b] <= rx_w[b] + 1;
      end
      if (!rx_ready[b] && rx_valid[b]) n_rx_stall++;
    end
  end
  always_comb for (int b = 0; b < NB; b++) begin
    rx_valid[b] = rst_n && rx_p[b] < PKTS;
    rx_data[b]  = wv(b, rx_p[b], rx_w[b]);
  end

  // Crossbar side: random grant, check the stream.
  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < NB; b++) begin
      if (tx_valid[b] && tx_grant[b]) begin
        word_t e;
        e = wv(b, tx_p[b], tx_w[b]);
        if (patched && b == 1 && tx_p[b] == 1 && tx_w[b] == 3) e = 32'hC0FFEE;
        tx_checks++;
        if (tx_data[b] != e) begin
          tx_fail++;
          $display("FAIL buffer %0d sent %h expected %h", b, tx_data[b], e);
        end
        if (tx_w[b] == PW - 1) begin tx_w[b] <= 0; tx_p[b] <= tx_p[b] + 1; end
        else tx_w[b] <= tx_w[b] + 1;
      end
      if (done_evt[b]) n_done++;
    end
  end
  always @(negedge clk) tx_grant <= (grant_random ? NB'($urandom) : '1) & ~(hold1 ? 4'b0010 : 4'b0000);

  initial begin
    int b, s, gap;
    foreach (rx_p[i]) begin rx_p[i] = 0; rx_w[i] = 0; tx_p[i] = 0; tx_w[i] = 0; end
    bctu_buf = 0; bctu_off = 0; bctu_we = 0; bctu_wdata = 0; st_we = 0; st_wdata = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Buffer 1 is not granted until both its slots hold a packet; then
    // packet 1 is found and patched through the BCTU before it is sent.
    wait (rx_p[1] == 2);
    @(negedge clk);
    for (s = 0; s < NP; s++) begin
      bctu_buf = 1; bctu_off = 4'(s * PW + 3); #1;
      if (bctu_rdata == wv(1, 1, 3) && state[1][s] == PKT_READY) break;
    end
    chk(s < NP, "BCTU reads the stored packet");
    if (s < NP) begin
      bctu_we = 1; bctu_wdata = 32'hC0FFEE; patched = 1;
      @(negedge clk) bctu_we = 0;
      bctu_off = 4'(s * PW + 3); #1;
      chk(bctu_rdata == 32'hC0FFEE, "BCTU write then read");
    end
    hold1 = 0;
    wait (tx_p[1] == 3);
    @(negedge clk) grant_random = 0;
    // back-to-back check on buffer 0 with a full grant
    // wait until all traffic is through
    wait (tx_p[0] == PKTS && tx_p[1] == PKTS && tx_p[2] == PKTS && tx_p[3] == PKTS);
    repeat (3) @(posedge clk);
    for (b = 0; b < NB; b++) chk(st_q[b] == 1, "status set at end of traffic");
    chk(n_rx_stall > 0, "receive stalled while full");
    chk(n_done == NB, $sformatf("one traffic-over event per buffer (%0d)", n_done));
    // clear status of buffer 2
    @(negedge clk) st_we = 4'b0100; st_wdata = 0;
    @(negedge clk) st_we = 0;
    chk(st_q[2] == 0 && st_q[3] == 1, "status cleared by software");
    checks += tx_checks;
    failures += tx_fail + gap_fail;
    chk(tx_checks == NB * PKTS * PW, "every word sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // With the grant held high, a packet that is ready when the previous one
  // ends starts in the next cycle.
  logic [NB-1:0] follow;
  int gap_fail = 0;
  always @(posedge clk) begin
    if (rst_n && !grant_random)
      for (int b = 0; b < NB; b++)
        if (follow[b] && !tx_valid[b]) begin
          gap_fail++;
          $display("FAIL idle cycle between packets on buffer %0d", b);
        end
    follow <= tx_done & tx_avail;
  end
endmodule
