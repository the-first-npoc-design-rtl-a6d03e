// tb_npoc_rcs: self-checking test of the reconfigurable crossbar switch.
// 1) Loads each of the six example topologies and checks, one clock after
//    the topology word changes (the second of the two reconfiguration clocks), the closed switching nodes against adjacency lists
//    written here (tree, hypercube, pipeline, star, 2x4 mesh, 2x4 torus), and
//    that nothing changes before that clock.
// 2) Random topology words and random sending inputs: grants, output valids,
//    data and sources are compared with a reference of the arbitration rule
//    (lowest numbered sender per output; an input moves only when it holds
//    all its outputs).
module tb_npoc_rcs;
  import npoc_pkg::*;
  import npoc_asm_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  word_t topo;
  logic [N-1:0] in_valid, in_grant, out_valid;
  word_t in_data [N], out_data [N];
  logic [2:0] out_src [N];
  logic [N-1:0] node [N];
  int checks = 0, failures = 0, n_conflict = 0;

  npoc_rcs #(.NPORTS(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Adjacency in the drawings' 1-based node numbers.
  function automatic logic adj(int t, int a, int b);
    int lo = (a < b) ? a : b, hi = (a < b) ? b : a;
    case (t)
      0: return (lo == 1 && hi inside {2, 3}) || (lo == 2 && hi inside {4, 5}) ||
                (lo == 3 && hi inside {6, 7}) || (lo == 4 && hi == 8);
      1: return (lo == 1 && hi inside {2, 4, 8}) || (lo == 2 && hi inside {3, 5}) ||
                (lo == 3 && hi inside {4, 6}) || (lo == 4 && hi == 7) ||
                (lo == 5 && hi inside {6, 8}) || (lo == 6 && hi == 7) || (lo == 7 && hi == 8);
      2: return hi == lo + 1;
      3: return lo == 1 && hi > 1;
      4: return (hi == lo + 1 && lo != 4) || (hi == lo + 4);
      default: return (hi == lo + 1 && lo != 4) || (hi == lo + 4) || (lo == 1 && hi == 4) ||
                      (lo == 5 && hi == 8);
    endcase
  endfunction

  initial begin
    topo = 0; in_valid = 0;
    foreach (in_data[i]) in_data[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // 1) example topologies, two-clock reconfiguration
    for (int t = 0; t < 6; t++) begin
      logic [N-1:0] prev [N];
      prev = node;
      @(negedge clk) topo = topo_word(t);
      #1;
      chk(node == prev, "nodes unchanged until the next clock");
      @(posedge clk); #1;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          chk(node[r][c] == ((r != c) && adj(t, r + 1, c + 1)), $sformatf("topology %0d node %0d,%0d", t, r, c));
    end
    // 2) random traffic
    for (int n = 0; n < 3000; n++) begin
      logic [N-1:0] eg;
      int w [N];
      @(negedge clk);
      if (n % 50 == 0) begin
        topo = $urandom;
        repeat (2) @(posedge clk);
        @(negedge clk);
      end
      in_valid = N'($urandom);
      foreach (in_data[i]) in_data[i] = $urandom;
      #1;
      for (int r = 0; r < N; r++) begin
        w[r] = -1;
        for (int c = 0; c < N; c++)
          if (w[r] < 0 && in_valid[c] && node[r][c]) w[r] = c;
      end
      for (int c = 0; c < N; c++) begin
        logic any;
        any = 0;
        eg[c] = in_valid[c];
        for (int r = 0; r < N; r++) if (node[r][c]) begin
          any = 1;
          if (w[r] != c) eg[c] = 0;
        end
        if (!any) eg[c] = 0;
        if (in_valid[c] && any && !eg[c]) n_conflict++;
      end
      chk(in_grant == eg, "grant");
      for (int r = 0; r < N; r++) begin
        logic ev;
        ev = (w[r] >= 0) && eg[w[r]];
        chk(out_valid[r] == ev, "out valid");
        if (ev) chk(out_data[r] == in_data[w[r]] && int'(out_src[r]) == w[r], "out data");
      end
    end
    chk(n_conflict > 0, "conflicts seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
