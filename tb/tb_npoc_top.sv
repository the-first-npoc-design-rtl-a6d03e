// tb_npoc_top: end-to-end test of the whole design at its default size, with
// six packets per sending port per topology. See npoc_top_env.
module tb_npoc_top;
  npoc_top_env #(.K(6), .RUN_A(1'b1)) env ();
  initial begin
    wait (env.done);
    $finish;
  end
endmodule
