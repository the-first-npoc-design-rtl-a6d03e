// npoc_asm_pkg: helpers for NPoC testbenches.
//
// Encodes instructions into 32-bit words (opcode, r1, r2, r3, 12-bit
// immediate) and builds crossbar topology words from lists of links. The
// topology encoding is computed here independently of the design: the bit of
// link (i,j), i<j, counts the pairs that come before it row by row.
package npoc_asm_pkg;
  import npoc_pkg::*;

  function automatic logic [31:0] asm_r(opcode_e op, int r1, int r2, int r3);
    return {op, 5'(r1), 5'(r2), 5'(r3), 12'd0};
  endfunction

  function automatic logic [31:0] asm_i(opcode_e op, int r1, int r2, int imm);
    return {op, 5'(r1), 5'(r2), 5'd0, 12'(imm)};
  endfunction

  // Index of link (a,b) among the upper-triangle pairs of an n-port switch.
  function automatic int link_bit(int a, int b, int n);
    int k, lo, hi;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    k  = 0;
    for (int i = 0; i < n; i++)
      for (int j = i + 1; j < n; j++) begin
        if (i == lo && j == hi) return k;
        k++;
      end
    return -1;
  endfunction

  // Topologies of the eight-node examples, ports numbered 0..7 (node k of the
  // drawings is port k-1): 0 tree, 1 hypercube, 2 pipeline, 3 star, 4 mesh
  // 2x4, 5 torus 2x4.
  function automatic logic [31:0] topo_word(int t);
    int e [$][2];
    logic [31:0] w;
    case (t)
      0: e = '{'{1,2},'{1,3},'{2,4},'{2,5},'{3,6},'{3,7},'{4,8}};
      1: e = '{'{1,2},'{1,4},'{1,8},'{2,3},'{2,5},'{3,4},'{3,6},'{4,7},
               '{5,6},'{5,8},'{6,7},'{7,8}};
      2: e = '{'{1,2},'{2,3},'{3,4},'{4,5},'{5,6},'{6,7},'{7,8}};
      3: e = '{'{1,2},'{1,3},'{1,4},'{1,5},'{1,6},'{1,7},'{1,8}};
      4: e = '{'{1,2},'{2,3},'{3,4},'{5,6},'{6,7},'{7,8},'{1,5},'{2,6},'{3,7},'{4,8}};
      default:
         e = '{'{1,2},'{2,3},'{3,4},'{5,6},'{6,7},'{7,8},'{1,5},'{2,6},'{3,7},'{4,8},
               '{1,4},'{5,8}};
    endcase
    w = '0;
    foreach (e[k]) w[link_bit(e[k][0] - 1, e[k][1] - 1, 8)] = 1'b1;
    return w;
  endfunction

endpackage
