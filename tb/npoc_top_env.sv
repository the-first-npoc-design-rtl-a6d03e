// npoc_top_env: end-to-end test environment for npoc_top at its default size
// (8 ports, 4 slots of 128-word packets per buffer).
//
// Run A (RUN_A=1), packet management: three packets are written into port 0
// while no link exists. The processor blocks the second, erases the third,
// installs a star topology, waits, and then sends the blocked one. Exactly
// the first two packets must reach the seven other ports.
//
// Run B, topology management: a program written after the management
// algorithm of the NPoC polls the communication status of buffers 1..8
// through the BCTU, counts the buffers whose traffic is over (clearing each
// status), and when the count goes from 1 to 8 loads the next topology word
// from data memory and writes it with reconf; after the sixth pattern it
// stops. For each of the six example topologies the environment has ports
// 1..7 each broadcast K packets; a scoreboard checks that every word reaches
// every linked port, in order, from the right source, and reaches no other.
// Measured: clocks per pattern, and clocks from the end of the last packet
// to the new topology in the switch; the switching nodes must follow the
// reconfiguration register after exactly one clock (two after reconf).
// Mechanism counters (interlock, forwarding, taken jumps, reconfigurations,
// receive backpressure, crossbar conflicts, blocked packets, traffic-over
// events) must all be non-zero. The enclosing testbench ends the simulation
// when `done` rises.
module npoc_top_env
  import npoc_pkg::*;
  import npoc_asm_pkg::*;
#(
  parameter int K     = 6,     // packets per sending port per topology
  parameter bit RUN_A = 1'b1
);
  localparam int N = 8, PW = 128, TOPO_BASE = 64;
  localparam int WATCHDOG = K * 6 * 7 * PW * 2 + 200000;

  logic clk = 0, rst_n = 0;
  logic done = 1'b0;   // set when the result line has been printed
  logic prog_we = 0, dload_we = 0;
  word_t prog_addr = 0, prog_data = 0, dload_addr = 0, dload_data = 0;
  logic [N-1:0] rx_valid, rx_ready, out_valid, ev_pkt_sent, ev_done, ev_rx_stall, ev_tx_wait, ev_blocked_slot;
  word_t rx_data [N], out_data [N], topo, reconf_count, pc_if;
  logic [2:0] out_src [N];
  logic [N-1:0] node [N];
  logic ev_retire, ev_stall, ev_flush, ev_fwd_f1, ev_fwd_f2, ev_reconf;

  npoc_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0;
  longint cyc = 0;
  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (clock %0d)", what, cyc); end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    done = 1'b1;
  end

  // ---------------- cores: packet sources ----------------
  int inj_left [N], inj_seq [N], inj_w [N];
  always_comb for (int p = 0; p < N; p++) begin
    rx_valid[p] = rst_n && inj_left[p] > 0;
    rx_data[p]  = {4'hA, 4'(p), 12'(inj_seq[p]), 12'(inj_w[p])};
  end
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < N; p++) if (rx_valid[p] && rx_ready[p]) begin
      if (inj_w[p] == PW - 1) begin
        inj_w[p]   <= 0;
        inj_seq[p] <= inj_seq[p] + 1;
        inj_left[p] <= inj_left[p] - 1;
      end else inj_w[p] <= inj_w[p] + 1;
    end
  end

  // ---------------- scoreboard ----------------
  int exp_seq [N][N], exp_w [N][N], got [N][N], sb_fail = 0, sb_checks = 0;
  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < N; r++) if (out_valid[r]) begin
      int c;
      word_t e;
      c = int'(out_src[r]);
      e = {4'hA, 4'(c), 12'(exp_seq[r][c]), 12'(exp_w[r][c])};
      sb_checks++;
      if (out_data[r] != e || !node[r][c]) begin
        sb_fail++;
        if (sb_fail < 10) $display("FAIL port %0d got %h from %0d, expected %h", r, out_data[r], c, e);
      end
      got[r][c]++;
      if (exp_w[r][c] == PW - 1) begin exp_w[r][c] = 0; exp_seq[r][c]++; end
      else exp_w[r][c]++;
    end
  end

  // ---------------- mechanism counters ----------------
  longint n_stall = 0, n_flush = 0, n_f1 = 0, n_f2 = 0, n_reconf = 0, n_rxs = 0, n_txw = 0,
          n_blk = 0, n_done = 0, n_sent = 0, n_retire = 0, last_done = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      n_retire += ev_retire;
      n_stall  += ev_stall;
      n_flush  += ev_flush;
      n_f1     += ev_fwd_f1;
      n_f2     += ev_fwd_f2;
      n_reconf += ev_reconf;
      n_rxs    += $countones(ev_rx_stall);
      n_txw    += $countones(ev_tx_wait);
      n_blk    += $countones(ev_blocked_slot);
      n_done   += $countones(ev_done);
      n_sent   += $countones(ev_pkt_sent);
      if (ev_done != 0) last_done = cyc;
    end
  end

  // Switching nodes expected for a topology word (independent expansion).
  function automatic logic linked(word_t w, int r, int c);
    if (r == c) return 1'b0;
    return w[link_bit(r, c, N)];
  endfunction

  // ---------------- programs ----------------
  word_t prog [$];
  function automatic int here();
    return prog.size() * 4;
  endfunction

  task automatic load_and_reset(word_t words [$], word_t data [$], int data_base);
    rst_n = 0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      prog_we = 1; prog_addr = i; prog_data = (i < words.size()) ? words[i] : 32'd0;
      dload_we = (i < data.size()); dload_addr = data_base + i; dload_data = (i < data.size()) ? data[i] : 0;
      @(negedge clk);
    end
    prog_we = 0; dload_we = 0;
    for (int r = 0; r < N; r++) begin
      inj_left[r] = 0; inj_seq[r] = 0; inj_w[r] = 0;
      for (int c = 0; c < N; c++) begin exp_seq[r][c] = 0; exp_w[r][c] = 0; got[r][c] = 0; end
    end
    @(negedge clk) rst_n = 1;
  endtask

  // Run A program: delay, block b1 p1, erase b1 p2, star, delay, send b1 p1.
  task automatic build_a(output int l_end);
    int l_d1, l_d2;
    prog.delete();
    prog.push_back(asm_i(OP_ADDI, 1, 0, 1));        // buffer 1
    prog.push_back(asm_i(OP_ADDI, 9, 0, 0));
    prog.push_back(asm_i(OP_ADDI, 10, 0, 200));
    prog.push_back(asm_i(OP_ADDI, 11, 0, 0));       // patched: l_d1
    l_d1 = here();
    prog.push_back(asm_i(OP_ADDI, 9, 9, 1));
    prog.push_back(asm_r(OP_JDI, 11, 9, 10));
    prog.push_back(asm_i(OP_BLOCK, 1, 0, 1));
    prog.push_back(asm_i(OP_ERASE, 1, 0, 2));
    prog.push_back(asm_i(OP_LOAD, 8, 0, TOPO_BASE));
    prog.push_back(asm_r(OP_RECONF, 8, 0, 0));
    prog.push_back(asm_i(OP_ADDI, 9, 0, 0));
    prog.push_back(asm_i(OP_ADDI, 10, 0, 400));
    prog.push_back(asm_i(OP_ADDI, 11, 0, 0));       // patched: l_d2
    l_d2 = here();
    prog.push_back(asm_i(OP_ADDI, 9, 9, 1));
    prog.push_back(asm_r(OP_JDI, 11, 9, 10));
    prog.push_back(asm_i(OP_SEND, 1, 0, 1));
    l_end = here();
    prog.push_back(asm_i(OP_JUMP, 0, 0, l_end));
    prog[3]  = asm_i(OP_ADDI, 11, 0, l_d1);
    prog[12] = asm_i(OP_ADDI, 11, 0, l_d2);
  endtask

  // Run B program: the topology management loop.
  //   r2 buffer number i, r4 pattern counter, r5 status read, r8 topology
  //   word, r20 next table address, r21 table end, r22 = 9, r23 = 1,
  //   r24 = 8, r25 L_NEXT, r26 L_SWEEP, r27 L_DONE.
  task automatic build_b(output int l_done);
    int l_sweep, l_scan, l_next, p_consts;
    prog.delete();
    prog.push_back(asm_i(OP_ADDI, 20, 0, TOPO_BASE));
    prog.push_back(asm_i(OP_ADDI, 21, 0, TOPO_BASE + 6));
    prog.push_back(asm_i(OP_ADDI, 22, 0, 9));
    prog.push_back(asm_i(OP_ADDI, 23, 0, 1));
    prog.push_back(asm_i(OP_ADDI, 24, 0, 8));
    p_consts = prog.size();
    prog.push_back(0); prog.push_back(0); prog.push_back(0);   // labels, patched
    prog.push_back(asm_i(OP_LOAD, 8, 20, 0));        // first topology
    prog.push_back(asm_r(OP_RECONF, 8, 0, 0));
    prog.push_back(asm_i(OP_ADDI, 20, 20, 1));
    prog.push_back(asm_i(OP_ADDI, 4, 0, 1));         // counter = 1
    l_sweep = here();
    prog.push_back(asm_i(OP_ADDI, 2, 0, 1));         // i = 1
    l_scan = here();
    prog.push_back(asm_r(OP_JEQ, 26, 2, 22));        // i == 9: sweep again
    prog.push_back(asm_i(OP_READ, 5, 2, 0));         // status of buffer i
    prog.push_back(asm_r(OP_JDI, 25, 5, 23));        // not over: next buffer
    prog.push_back(asm_i(OP_ADDI, 4, 4, 1));
    prog.push_back(asm_i(OP_WRITE, 0, 2, 0));        // clear the status
    prog.push_back(asm_r(OP_JDI, 25, 4, 24));        // counter != 8: next buffer
    prog.push_back(asm_r(OP_JEQ, 27, 20, 21));       // six patterns done: stop
    prog.push_back(asm_i(OP_LOAD, 8, 20, 0));
    prog.push_back(asm_r(OP_RECONF, 8, 0, 0));       // next topology
    prog.push_back(asm_i(OP_ADDI, 20, 20, 1));
    prog.push_back(asm_i(OP_ADDI, 4, 0, 1));         // counter = 1
    l_next = here();
    prog.push_back(asm_i(OP_ADDI, 2, 2, 1));         // i = i + 1
    prog.push_back(asm_i(OP_JUMP, 0, 0, l_scan));
    l_done = here();
    prog.push_back(asm_i(OP_JUMP, 0, 0, l_done));
    prog[p_consts]     = asm_i(OP_ADDI, 25, 0, l_next);
    prog[p_consts + 1] = asm_i(OP_ADDI, 26, 0, l_sweep);
    prog[p_consts + 2] = asm_i(OP_ADDI, 27, 0, l_done);
  endtask

  // The processor has stopped when for 16 clocks it fetches only its final
  // self-jump and the three words behind it (a single fetch there may be a
  // prefetch behind another taken jump).
  task automatic wait_halt(int l_end);
    int n;
    n = 0;
    while (n < 16) begin
      @(posedge clk);
      n = (pc_if >= l_end && pc_if <= l_end + 12) ? n + 1 : 0;
    end
  endtask

  initial begin
    word_t tdata [$];
    int l_end;
    longint t0, t1, lat_min, lat_max;
    lat_min = 1 << 30;
    lat_max = 0;
    for (int p = 0; p < N; p++) begin inj_left[p] = 0; inj_seq[p] = 0; inj_w[p] = 0; end

    // ======== Run A ========
    if (RUN_A) begin
      build_a(l_end);
      tdata = '{topo_word(3)};
      load_and_reset(prog, tdata, TOPO_BASE);
      inj_left[0] = 3;
      wait_halt(l_end);
      repeat (3 * PW) @(posedge clk);
      #1;
      for (int r = 1; r < N; r++) chk(got[r][0] == 2 * PW, $sformatf("run A: port %0d got %0d words", r, got[r][0]));
      chk(got[0][0] == 0, "run A: nothing back to the sender");
      chk(n_blk > 0, "run A: a packet was held blocked");
      chk(sb_fail == 0, "run A: scoreboard");
    end

    // ======== Run B ========
    build_b(l_end);
    tdata.delete();
    for (int t = 0; t < 6; t++) tdata.push_back(topo_word(t));
    load_and_reset(prog, tdata, TOPO_BASE);
    for (int t = 0; t < 6; t++) begin
      wait (topo == topo_word(t));
      #1;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          chk(node[r][c] == (t == 0 ? 1'b0 : linked(topo_word(t - 1), r, c)),
              "switching nodes unchanged in the clock the register is written");
      @(posedge clk);
      #1;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          chk(node[r][c] == linked(topo_word(t), r, c), $sformatf("topology %0d node %0d,%0d", t, r, c));
      if (t > 0) begin
        if (cyc - last_done < lat_min) lat_min = cyc - last_done;
        if (cyc - last_done > lat_max) lat_max = cyc - last_done;
        $display("topology %0d in place %0d clocks after the last packet ended", t, cyc - last_done);
      end
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          got[r][c] = 0; exp_seq[r][c] = inj_seq[c]; exp_w[r][c] = 0;
        end
      t0 = cyc;
      @(negedge clk);
      for (int p = 1; p < N; p++) inj_left[p] = K;
      if (t < 5) wait (topo == topo_word(t + 1));
      else wait_halt(l_end);
      t1 = last_done;
      $display("topology %0d: %0d packets of %0d bits in %0d clocks (%0.2f us at 50 MHz)",
               t, 7 * K, PW * 32, t1 - t0, real'(t1 - t0) * 0.02);
      for (int r = 0; r < N; r++)
        for (int c = 1; c < N; c++)
          chk(got[r][c] == (linked(topo_word(t), r, c) ? K * PW : 0),
              $sformatf("topology %0d: port %0d got %0d words from %0d", t, r, got[r][c], c));
    end
    repeat (20) @(posedge clk);
    chk(pc_if >= l_end && pc_if <= l_end + 12 && topo == topo_word(5), "program stopped after six topologies");
    chk(n_reconf == 6 + (RUN_A ? 1 : 0) && reconf_count == 6, $sformatf("reconfigurations %0d", n_reconf));
    chk(sb_fail == 0, "scoreboard");
    chk(n_stall > 0, "load-use interlock happened");
    chk(n_f1 > 0 && n_f2 > 0, "forwarding from EX/ME and ME/WB happened");
    chk(n_flush > 0, "taken jumps happened");
    chk(n_rxs > 0, "receive backpressure happened");
    chk(n_txw > 0, "crossbar conflicts happened");
    chk(n_done >= 42, "traffic-over events");
    chk(n_sent == 42 * K + (RUN_A ? 2 : 0), $sformatf("packets sent %0d", n_sent));
    checks += sb_checks;
    $display("mechanisms: retired %0d, interlocks %0d, F1 %0d, F2 %0d, taken jumps %0d, reconfigurations %0d,",
             n_retire, n_stall, n_f1, n_f2, n_flush, n_reconf);
    $display("  receive stalls %0d, crossbar waits %0d, blocked-slot clocks %0d, packets sent %0d, traffic-over %0d",
             n_rxs, n_txw, n_blk, n_sent, n_done);
    $display("reconfiguration latency after the last packet: %0d..%0d clocks", lat_min, lat_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    done = 1'b1;
  end
endmodule
