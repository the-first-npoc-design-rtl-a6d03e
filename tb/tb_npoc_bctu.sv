// tb_npoc_bctu: self-checking test of the Buffer and Crossbar Transfer Unit.
// Drives reads and writes to each region of the address map (status
// registers 1..NB, crossbar rows, packet words, unmapped addresses) and checks
// the decoded buffer/offset, the write strobes and the returned word against
// values worked out in the testbench.
module tb_npoc_bctu;
  import npoc_pkg::*;
  localparam int NB = 8, NP = 4, PW = 16, NPORTS = 8;
  logic rd, wr;
  word_t addr, wdata, rdata;
  logic [2:0] pkt_buf;
  logic [5:0] pkt_off;
  logic pkt_we;
  word_t pkt_wdata, pkt_rdata, st_wdata;
  logic [NB-1:0] st_we;
  word_t st_q [NB];
  logic [NPORTS-1:0] xbar_rows [NPORTS];
  int checks = 0, failures = 0;

  npoc_bctu #(.NB(NB), .NP(NP), .PW(PW), .NPORTS(NPORTS)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s addr=%h", what, addr); end
  endtask

  initial begin
    foreach (st_q[i]) st_q[i] = 32'h100 + i;
    foreach (xbar_rows[i]) xbar_rows[i] = 8'(8'h31 * (i + 1));
    for (int n = 0; n < 3000; n++) begin
      int kind, b, o;
      kind = $urandom_range(0, 3);
      b = $urandom_range(0, NB - 1);
      o = $urandom_range(0, NP * PW - 1);
      case (kind)
        0: addr = b + 1;
        1: addr = 32'h4000 + $urandom_range(0, NPORTS - 1);
        2: addr = 32'h8000 + b * NP * PW + o;
        default: addr = (n % 2 != 0) ? 0 : 32'h8000 + NB * NP * PW + $urandom_range(0, 50);
      endcase
      rd = 1'($urandom_range(0, 1));
      wr = !rd;
      wdata = $urandom;
      pkt_rdata = $urandom;
      #1;
      if (kind == 2) begin
        chk(int'(pkt_buf) == b && int'(pkt_off) == o, "pkt decode");
        chk(pkt_we == wr && st_we == 0, "pkt write strobe");
        if (wr) chk(pkt_wdata == wdata, "pkt wdata");
        if (rd) chk(rdata == pkt_rdata, "pkt read");
      end else if (kind == 0) begin
        chk(!pkt_we && st_we == (wr ? (8'd1 << b) : 8'd0), "status strobe");
        if (wr) chk(st_wdata == wdata, "status wdata");
        if (rd) chk(rdata == 32'h100 + b, "status read");
      end else if (kind == 1) begin
        chk(!pkt_we && st_we == 0, "xbar no write");
        if (rd) chk(rdata == 32'(xbar_rows[addr - 32'h4000]), "xbar read");
      end else begin
        chk(!pkt_we && st_we == 0 && (!rd || rdata == 0), "unmapped");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
