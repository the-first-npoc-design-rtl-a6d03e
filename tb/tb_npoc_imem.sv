// tb_npoc_imem: self-checking test of the instruction memory.
// Loads random words, then fetches them back by byte address (PC = 4*index),
// including addresses past the end, which must read as zero.
module tb_npoc_imem;
  import npoc_pkg::*;
  logic clk = 0;
  word_t pc, inst, prog_addr, prog_data;
  logic prog_we;
  int checks = 0, failures = 0;
  word_t model [256];

  npoc_imem #(.DEPTH(256)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog_we = 0; pc = 0; prog_addr = 0; prog_data = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = i; prog_data = $urandom; model[i] = prog_data;
    end
    @(negedge clk) prog_we = 0;
    for (int n = 0; n < 600; n++) begin
      int i;
      i = $urandom_range(0, 299);
      pc = 4 * i;
      #1;
      checks++;
      if (inst !== ((i < 256) ? model[i] : 32'd0)) begin
        failures++;
        $display("FAIL pc=%h inst=%h", pc, inst);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
