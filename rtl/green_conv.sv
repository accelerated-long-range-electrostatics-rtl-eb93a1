// green_conv: convolution with the Green's function in the Fourier domain.
//
// After the last forward 1D FFT (along Z) each of the 64 FFT outputs is
// multiplied by the Green's function value of its grid point, read from the
// Green's table, before it is written back to the grid memory.  Convolution in
// space is this point-wise product in the Fourier domain, as the design
// description states.  The Green's value is real with GREEN_FRAC fraction bits
// (own fixed-point choice, standing in for a floating point multiplier).
// Latency: one cycle.
module green_conv
  import lr_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  cplx_t            in_data [NNN3D],
  input  word_t            green   [NNN3D],
  output logic             out_valid,
  output cplx_t            out_data [NNN3D]
);
  always_ff @(posedge clk)
    for (int p = 0; p < NNN3D; p++) begin
      out_data[p].re <= fxmul(in_data[p].re, green[p], GREEN_FRAC);
      out_data[p].im <= fxmul(in_data[p].im, green[p], GREEN_FRAC);
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
endmodule
