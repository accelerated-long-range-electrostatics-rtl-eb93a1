// charge_accum: charge grid accumulation (read-modify-write datapath).
//
// Adds the 64 charge contributions of one particle, produced by the charge
// coefficient generator, to the 64 grid points read back from the clustered
// grid memory, giving the words to write back.  The contributions carry 27
// fraction bits and are rescaled to the grid format (GRID_FRAC fraction bits,
// truncating); only the real part changes.  The description names this block
// and its job; the single registered adder per port is this design's choice.
// Latency: one cycle from in_valid to out_valid.  Hazards between particles
// whose 4x4x4 boxes overlap are avoided upstream by the sequencer stalling.
module charge_accum
  import lr_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  cplx_t            grid_in [NNN3D],
  input  word_t            contrib [NNN3D],
  output logic             out_valid,
  output cplx_t            grid_out [NNN3D]
);
  always_ff @(posedge clk)
    for (int p = 0; p < NNN3D; p++) begin
      grid_out[p].re <= grid_in[p].re + (contrib[p] >>> (COEF_FRAC - GRID_FRAC));
      grid_out[p].im <= grid_in[p].im;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
endmodule
