// tb_npoc_scheduler: self-checking test of the packet scheduler.
// A random stream of engine events (claim/finish of receive and transmit,
// obeying the handshake) and of send/block/erase commands, some naming
// invalid buffers or slots. A reference model keeps each slot's state and
// the arrival order of each buffer's packets; every cycle the scheduler's
// slot states, free slot, next packet to send (oldest ready) and busy flags
// are compared with it.
module tb_npoc_scheduler;
  import npoc_pkg::*;
  localparam int NB = 4, NP = 4;
  logic clk = 0, rst_n = 0;
  sch_cmd_e cmd;
  word_t cmd_buf, cmd_pkt;
  logic [NB-1:0] free_valid, rx_claim, rx_done, tx_avail, tx_claim, tx_done, busy;
  logic [1:0] free_slot [NB], rx_slot [NB], tx_slot [NB], tx_cur [NB];
  pkt_state_e state [NB][NP];
  int checks = 0, failures = 0;
  int n_send = 0, n_block = 0, n_erase = 0, n_tx = 0;

  npoc_scheduler #(.NB(NB), .NP(NP)) dut (.*);
  always #5 clk = ~clk;

  pkt_state_e m [NB][NP];
  int order [NB][$];          // slots in arrival order
  logic rx_act [NB], tx_act [NB];
  int rx_s [NB], tx_s [NB];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int m_free(int b);
    for (int s = 0; s < NP; s++) if (m[b][s] == PKT_FREE) return s;
    return -1;
  endfunction
  function automatic int m_next(int b);
    foreach (order[b][k]) if (m[b][order[b][k]] == PKT_READY) return order[b][k];
    return -1;
  endfunction
  function automatic void drop(int b, int s);
    foreach (order[b][k]) if (order[b][k] == s) begin order[b].delete(k); return; end
  endfunction

  initial begin
    cmd = SCH_NONE; cmd_buf = 0; cmd_pkt = 0;
    rx_claim = 0; rx_done = 0; tx_claim = 0; tx_done = 0;
    foreach (rx_slot[b]) begin rx_slot[b] = 0; tx_cur[b] = 0; end
    foreach (m[b, s]) m[b][s] = PKT_FREE;
    foreach (rx_act[b]) begin rx_act[b] = 0; tx_act[b] = 0; rx_s[b] = 0; tx_s[b] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      int fs, nx, cb, cp;
      @(negedge clk);
      // compare with the model
      for (int b = 0; b < NB; b++) begin
        fs = m_free(b);
        nx = m_next(b);
        for (int s = 0; s < NP; s++) chk(state[b][s] == m[b][s], "state");
        chk(free_valid[b] == (fs >= 0) && (fs < 0 || int'(free_slot[b]) == fs), "free slot");
        chk(tx_avail[b] == (nx >= 0) && (nx < 0 || int'(tx_slot[b]) == nx), "oldest ready");
        begin
          logic bz;
          bz = 0;
          for (int s = 0; s < NP; s++) if (m[b][s] inside {PKT_RX, PKT_READY}) bz = 1;
          chk(busy[b] == bz, "busy");
        end
      end
      // drive engine events
      rx_claim = 0; rx_done = 0; tx_claim = 0; tx_done = 0;
      for (int b = 0; b < NB; b++) begin
        if (!rx_act[b] && free_valid[b] && $urandom_range(0, 2) == 0) rx_claim[b] = 1;
        else if (rx_act[b] && $urandom_range(0, 2) == 0) begin rx_done[b] = 1; rx_slot[b] = 2'(rx_s[b]); end
        if (tx_act[b] && $urandom_range(0, 3) == 0) begin tx_done[b] = 1; tx_cur[b] = 2'(tx_s[b]); end
        if ((!tx_act[b] || tx_done[b]) && tx_avail[b] && $urandom_range(0, 1) == 0) tx_claim[b] = 1;
      end
      cb = $urandom_range(0, NB + 1);
      cp = $urandom_range(0, NP + 1);
      cmd = sch_cmd_e'($urandom_range(0, 3));
      cmd_buf = cb; cmd_pkt = cp;
      @(posedge clk);
      // update the model: commands, then engine events
      if (cmd != SCH_NONE && cb >= 1 && cb <= NB && cp < NP) begin
        case (cmd)
          SCH_SEND:  if (m[cb-1][cp] == PKT_BLOCKED) begin m[cb-1][cp] = PKT_READY; n_send++; end
          SCH_BLOCK: if (m[cb-1][cp] == PKT_READY) begin m[cb-1][cp] = PKT_BLOCKED; n_block++; end
          SCH_ERASE: if (m[cb-1][cp] inside {PKT_READY, PKT_BLOCKED}) begin
                       m[cb-1][cp] = PKT_FREE; drop(cb-1, cp); n_erase++; end
          default: ;
        endcase
      end
      for (int b = 0; b < NB; b++) begin
        if (rx_claim[b]) begin rx_act[b] = 1; rx_s[b] = int'(free_slot[b]); m[b][free_slot[b]] = PKT_RX; end
        if (rx_done[b]) begin rx_act[b] = 0; m[b][rx_s[b]] = PKT_READY; order[b].push_back(rx_s[b]); end
        if (tx_done[b]) begin tx_act[b] = 0; m[b][tx_s[b]] = PKT_FREE; drop(b, tx_s[b]); n_tx++; end
        if (tx_claim[b]) begin tx_act[b] = 1; tx_s[b] = int'(tx_slot[b]); m[b][tx_slot[b]] = PKT_TX; end
      end
    end
    chk(n_send > 0 && n_block > 0 && n_erase > 0 && n_tx > 0, "all commands exercised");
    $display("send=%0d block=%0d erase=%0d sent=%0d", n_send, n_block, n_erase, n_tx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
