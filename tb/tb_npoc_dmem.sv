// tb_npoc_dmem: self-checking test of the data memory.
// Preloads words through the load port, then mixes random stores and loads
// (word addresses) and checks every load against a reference array, with the
// written value visible the cycle after the store.
module tb_npoc_dmem;
  import npoc_pkg::*;
  logic clk = 0;
  logic re, we, load_we;
  word_t addr, wdata, rdata, load_addr, load_data;
  int checks = 0, failures = 0;
  word_t model [128];

  npoc_dmem #(.DEPTH(128)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re = 0; we = 0; load_we = 0; addr = 0; wdata = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = i; load_data = $urandom; model[i] = load_data;
    end
    @(negedge clk) load_we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      addr = $urandom_range(0, 135);
      re = 1'($urandom_range(0, 1));
      we = !re && ($urandom_range(0, 1) != 0);
      wdata = $urandom;
      #1;
      if (re) begin
        checks++;
        if (rdata !== ((addr < 128) ? model[addr] : 32'd0)) begin
          failures++;
          $display("FAIL load %0d got %h", addr, rdata);
        end
      end
      @(posedge clk);
      if (we && addr < 128) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
