// tb_npoc_workload: the evaluated workload at full size. For each of the six
// example topologies, 1001 packets of 4096 bits (143 from each of seven
// ports) are broadcast over the crossbar while the management program waits
// for the end of the pattern and installs the next topology. Prints the
// clocks each pattern takes and the reconfiguration latency. See
// npoc_top_env.
module tb_npoc_workload;
  npoc_top_env #(.K(143), .RUN_A(1'b0)) env ();
  initial begin
    wait (env.done);
    $finish;
  end
endmodule
