// tb_lr_full: end-to-end test of lr_top with its default parameters
// (32x32x32 grid, 32768 particles).  One iteration with 2000 particles and a
// slow host (grid clearing phase, back-pressure), then one complete iteration
// with the full 32768 particles.  See lr_tb_env for the checks.
module tb_lr_full;
  lr_tb_env #(.FULL(1'b1), .LG(5), .NPART(32768), .NP1(2000), .NP2(32768), .MAXCYC(2_000_000)) env ();
endmodule
