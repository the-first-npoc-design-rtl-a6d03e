// tb_npoc_regfile: self-checking test of the register bank.
// Random writes and three-port reads against a reference array; checks that
// register 0 stays zero and that a read of the register being written returns
// the new value in the same cycle.
module tb_npoc_regfile;
  import npoc_pkg::*;
  logic clk = 0, rst_n = 0;
  raddr_t ar1, ar2, ar3, wa;
  word_t dr1, dr2, dr3, wd;
  logic we;
  int checks = 0, failures = 0;
  word_t model [32];

  npoc_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  function automatic word_t ref_rd(raddr_t a);
    if (a == 0) return 0;
    if (we && wa == a) return wd;
    return model[a];
  endfunction

  initial begin
    we = 0; wa = 0; wd = 0; ar1 = 0; ar2 = 0; ar3 = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we  = 1'($urandom_range(0, 1));
      wa  = raddr_t'($urandom);
      wd  = $urandom;
      ar1 = (n % 5 == 0) ? wa : raddr_t'($urandom);
      ar2 = raddr_t'($urandom);
      ar3 = (n % 7 == 0) ? 0 : raddr_t'($urandom);
      #1;
      chk(dr1, ref_rd(ar1), "dr1");
      chk(dr2, ref_rd(ar2), "dr2");
      chk(dr3, ref_rd(ar3), "dr3");
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
