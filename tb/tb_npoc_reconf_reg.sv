// tb_npoc_reconf_reg: self-checking test of the reconfiguration register.
// Random write pulses; the register must hold the last word written from the
// next clock on, pulse `updated` once per write and count the writes.
module tb_npoc_reconf_reg;
  import npoc_pkg::*;
  logic clk = 0, rst_n = 0, we, updated;
  word_t wdata, topo, count;
  int checks = 0, failures = 0;
  word_t exp_topo = 0, exp_cnt = 0;
  logic exp_upd = 0;

  npoc_reconf_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wdata = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      checks++;
      if (topo !== exp_topo || updated !== exp_upd || count !== exp_cnt) begin
        failures++;
        $display("FAIL topo=%h/%h upd=%b/%b cnt=%0d/%0d", topo, exp_topo, updated, exp_upd, count, exp_cnt);
      end
      we = $urandom_range(0, 3) == 0;
      wdata = $urandom;
      @(posedge clk);
      exp_upd = we;
      if (we) begin exp_topo = wdata; exp_cnt++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
