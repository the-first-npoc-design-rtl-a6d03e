// tb_npoc_forwarding: self-checking test of the forwarding unit.
// Random register numbers and write enables; the expected select of each
// operand is worked out in the testbench (EX/ME first, then ME/WB, never for
// register 0, never from EX/ME when that result is a memory or BCTU value).
module tb_npoc_forwarding;
  import npoc_pkg::*;
  raddr_t ar1, ar2, ar3, ar1a, ar1b;
  logic exme_we, exme_from_alu, mewb_we;
  fwd_e c1, c2, c3;
  int checks = 0, failures = 0;
  int n_f1 = 0, n_f2 = 0;

  npoc_forwarding dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fwd_e ref_sel(raddr_t s);
    if (s != 0 && exme_we && exme_from_alu && ar1a == s) return FWD_F1;
    if (s != 0 && mewb_we && ar1b == s) return FWD_F2;
    return FWD_REG;
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      ar1 = raddr_t'($urandom_range(0, 3));
      ar2 = raddr_t'($urandom_range(0, 3));
      ar3 = raddr_t'($urandom_range(0, 3));
      ar1a = raddr_t'($urandom_range(0, 3));
      ar1b = raddr_t'($urandom_range(0, 3));
      exme_we = 1'($urandom_range(0, 1));
      exme_from_alu = $urandom_range(0, 3) != 0;
      mewb_we = 1'($urandom_range(0, 1));
      #1;
      checks++;
      if (c1 !== ref_sel(ar3) || c2 !== ref_sel(ar2) || c3 !== ref_sel(ar1)) begin
        failures++;
        $display("FAIL %0d %0d %0d a=%0d b=%0d", ar1, ar2, ar3, ar1a, ar1b);
      end
      if (c2 == FWD_F1) n_f1++;
      if (c2 == FWD_F2) n_f2++;
    end
    checks++;
    if (n_f1 == 0 || n_f2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
