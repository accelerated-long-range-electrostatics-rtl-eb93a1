// lr_pkg: shared constants, number formats and helpers of the long range (LR)
// electrostatics accelerator.
//
// Number formats (all two's complement unless noted):
//   offset   : unsigned Q0.27, the distance of a particle from its floor grid point
//              (the 27-bit offset width follows the design description).
//   charge   : signed Q5.27 in 32 bits (follows the design description).
//   coeff    : signed 32 bits with 27 fraction bits (basis values, products).
//   grid     : one grid point is 64 bits, a real and an imaginary 32-bit part
//              with GRID_FRAC fraction bits.  The description stores two FP32
//              values; this design uses fixed point instead (own choice).
//   green    : 32 bits per grid point with GREEN_FRAC fraction bits.
//   twiddle  : signed 32 bits with TW_FRAC fraction bits.
// The cluster geometry is fixed by the third order interpolation: four nearest
// neighbours per dimension, 64 in 3D (NNN3D).
package lr_pkg;

  localparam int NNN3D = 64;

  localparam int OFS_W      = 27;  // offset bits per dimension
  localparam int Q_W        = 32;  // charge / force word
  localparam int COEF_FRAC  = 27;  // fraction bits of coefficients and charge
  localparam int GRID_FRAC  = 24;  // fraction bits of grid data (own choice)
  localparam int GREEN_FRAC = 24;  // fraction bits of the Green's table (own choice)
  localparam int TW_FRAC    = 30;  // fraction bits of FFT twiddles

  typedef logic signed [31:0] word_t;

  typedef struct packed {
    word_t re;
    word_t im;
  } cplx_t;

  // Fixed-point constant from a real number, COEF_FRAC fraction bits.
  function automatic word_t to_coef(real v);
    return word_t'($rtoi(v * real'(1 << COEF_FRAC)));
  endfunction

  // Signed multiply of two 32-bit words, keeping FRAC fraction bits of b.
  function automatic word_t fxmul(word_t a, word_t b, int frac);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return word_t'(p >>> frac);
  endfunction

  // Complex multiply by a twiddle factor with TW_FRAC fraction bits.
  function automatic cplx_t cmul_tw(cplx_t a, cplx_t w);
    logic signed [63:0] rr, ii, ri, ir;
    cplx_t r;
    rr = 64'(a.re) * 64'(w.re);
    ii = 64'(a.im) * 64'(w.im);
    ri = 64'(a.re) * 64'(w.im);
    ir = 64'(a.im) * 64'(w.re);
    r.re = word_t'((rr - ii) >>> TW_FRAC);
    r.im = word_t'((ri + ir) >>> TW_FRAC);
    return r;
  endfunction

  // Exchanging real and imaginary parts turns a forward DFT into an inverse one:
  // swap(DFT(swap(x))) = N * IDFT(x).
  function automatic cplx_t cswap(cplx_t a);
    cplx_t r;
    r.re = a.im;
    r.im = a.re;
    return r;
  endfunction

  // Latency of fft_pipeline for a transform of 2**len points when built for
  // 2**logn_max points: one register per delay stage, the stage delays, and a
  // frame of reordering plus its output register.
  function automatic int fft_latency(int logn_max, int len);
    return logn_max + ((1 << len) - 1) + (1 << len) + 1;
  endfunction

  // Latencies of the clustered memories (in clock cycles).
  localparam int GRID_RD_LAT = 7;  // 3 align + 1 bank + 3 realign
  localparam int GRID_WR_LAT = 4;  // 3 align + 1 bank write

endpackage
