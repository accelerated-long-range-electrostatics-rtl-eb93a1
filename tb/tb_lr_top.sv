// tb_lr_top: end-to-end test of lr_top on an 8x8x8 grid (reduced size).
// Two LR iterations: 100 particles with a slow host (grid clearing phase,
// force back-pressure), then 600 particles with an always-ready host.  See
// lr_tb_env for the reference model and the checks.
module tb_lr_top;
  lr_tb_env #(.FULL(1'b0), .LG(3), .NPART(600), .NP1(100), .NP2(600), .MAXCYC(200_000)) env ();
endmodule
