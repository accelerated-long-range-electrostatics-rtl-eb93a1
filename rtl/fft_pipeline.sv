// fft_pipeline: streaming one-dimensional FFT, natural order in and out.
//
// One complex point enters per cycle and, after a fixed latency, the
// transform points leave one per cycle in natural order, so frames can follow
// each other without gaps.  The design description uses a vendor FFT core
// configured for natural order and a run-time length up to the largest grid
// dimension; this module is a plain replacement written for this design:
// a radix-2 decimation-in-frequency single-path delay-feedback (R2SDF)
// pipeline followed by a double-buffered bit-reversal stage.
//
// Stage s (s = 0..LOGN-1) holds a delay line of M = 2**(LOGN-1-s) points.
// During the first half of each 2M-point block it stores the inputs and sends
// out the twiddled differences of the previous block; during the second half
// it sends out the sums and stores the differences.  With scale = 1 each
// stage halves its results, so the transform computed is
// X[k] = (1/N) * sum_n x[n] W^(n k), W = exp(-2 pi i / N), which cannot
// overflow; with scale = 0 nothing is halved (X[k] = sum_n x[n] W^(n k)) and
// the caller must keep the result inside 32 bits (results wrap).  The
// long-range pipeline scales its forward passes and not its inverse passes,
// which gives the usual 1/N normalisation of a forward/inverse pair without
// throwing away the low bits of the potential.  A transform shorter than the
// maximum (len < LOGN) bypasses the first LOGN-len stages.  scale must be held
// while a frame is in the pipeline.
//
// The pipeline always advances.  in_idx is the position of the input point in
// its frame; it must count up by one every cycle (also while in_valid is low)
// so that a frame can leave the pipeline after the last input.
// Latency: lr_pkg::fft_latency(LOGN, len) = LOGN + 2*2**len cycles from
// input point k to output point k.
module fft_pipeline
  import lr_pkg::*;
#(
  parameter int LOGN = 5,                // maximum length 2**LOGN (grid dimension 32)
  localparam int N   = 1 << LOGN,
  localparam int LW  = $clog2(LOGN + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [LW-1:0]   len,           // log2 of the transform length, 2..LOGN
  input  logic            scale,         // 1: halve after every stage
  input  logic            in_valid,
  input  logic [LOGN-1:0] in_idx,
  input  cplx_t           in_data,
  output logic            out_valid,
  output logic [LOGN-1:0] out_idx,
  output cplx_t           out_data
);

  localparam real PI = 3.14159265358979323846;
  localparam int  MAXLAT = LOGN + 2 * N;

  typedef word_t tw_tab_t [N/2];

  // Twiddle W^m = cos(2 pi m / N) - i sin(2 pi m / N), TW_FRAC fraction bits.
  function automatic tw_tab_t make_twiddles(bit imag);
    tw_tab_t t;
    for (int m = 0; m < N / 2; m++) begin
      if (imag) t[m] = word_t'($rtoi(-$sin(2.0 * PI * m / N) * real'(1 << TW_FRAC)));
      else      t[m] = word_t'($rtoi( $cos(2.0 * PI * m / N) * real'(1 << TW_FRAC)));
    end
    return t;
  endfunction

  localparam tw_tab_t TWR = make_twiddles(1'b0);
  localparam tw_tab_t TWI = make_twiddles(1'b1);

  // ---------------- delay-feedback stages ----------------
  cplx_t           sd [LOGN+1];   // stage inputs; sd[LOGN] is the SDF output
  logic [LOGN-1:0] sc [LOGN+1];   // position labels

  assign sd[0] = in_data;
  assign sc[0] = in_idx;

  for (genvar s = 0; s < LOGN; s++) begin : g_stage
    localparam int M = 1 << (LOGN - 1 - s);
    cplx_t           dl [M];      // delay line
    cplx_t           f, y, nx;
    logic            en, half;
    int unsigned     ptr;

    assign en   = (s >= LOGN - int'(len));
    assign half = sc[s][LOGN-1-s];
    assign ptr  = int'(sc[s]) % M;
    assign f    = dl[ptr];

    always_comb begin
      if (half) begin
        y.re  = word_t'((33'(f.re) + 33'(sd[s].re)) >>> scale);
        y.im  = word_t'((33'(f.im) + 33'(sd[s].im)) >>> scale);
        nx.re = word_t'((33'(f.re) - 33'(sd[s].re)) >>> scale);
        nx.im = word_t'((33'(f.im) - 33'(sd[s].im)) >>> scale);
      end else begin
        y  = cmul_tw(f, '{re: TWR[ptr << s], im: TWI[ptr << s]});
        nx = sd[s];
      end
    end

    always_ff @(posedge clk) begin
      if (en) begin
        dl[ptr]   <= nx;
        sd[s+1]   <= y;
        sc[s+1]   <= sc[s] - LOGN'(M);
      end else begin
        sd[s+1]   <= sd[s];
        sc[s+1]   <= sc[s];
      end
    end
  end

  // ---------------- bit-reversal (natural order) stage ----------------
  cplx_t           rbuf [2][N];
  logic            wbank;
  logic [LOGN-1:0] pmask, pl, prev;

  assign pmask = LOGN'((1 << len) - 1);
  assign pl    = sc[LOGN] & pmask;

  always_comb begin
    logic [LOGN-1:0] r;
    for (int i = 0; i < LOGN; i++) r[i] = pl[LOGN-1-i];
    prev = r >> (LOGN - int'(len));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) wbank <= 1'b0;
    else if (pl == pmask) wbank <= ~wbank;

  always_ff @(posedge clk) begin
    rbuf[wbank][prev] <= sd[LOGN];
    out_data <= rbuf[~wbank][pl];
    out_idx  <= pl;
  end

  // ---------------- valid tag ----------------
  logic [MAXLAT-1:0] vdl;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vdl <= '0;
    else        vdl <= {vdl[MAXLAT-2:0], in_valid};
  assign out_valid = vdl[fft_latency(LOGN, int'(len)) - 1];

endmodule
