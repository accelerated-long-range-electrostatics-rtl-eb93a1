// force_mac: force multiply-accumulate for one force direction.
//
// Multiplies the 64 electrostatic potentials of the particle's 4x4x4 box
// (real part of the grid after the inverse FFT, GRID_FRAC fraction bits) by
// the 64 force coefficients of that direction (27 fraction bits) and sums the
// products with a six-level adder tree: a bank of multipliers feeding an adder
// tree, as the design description has it, in fixed point instead of floating
// point.  Every level is registered: latency 7 cycles (1 multiply + 6 adds).
// The sum is kept in 38 bits and saturated to the 32-bit output.
module force_mac
  import lr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t pot  [NNN3D],
  input  word_t coef [NNN3D],
  output logic  out_valid,
  output word_t force_out
);
  localparam int LV = 6;           // log2(64) adder levels
  localparam int SW = 32 + LV;

  logic signed [SW-1:0] lvl [LV+1][NNN3D];
  logic [LV:0]          vp;

  always_ff @(posedge clk) begin
    for (int p = 0; p < NNN3D; p++)
      lvl[0][p] <= SW'(fxmul(pot[p], coef[p], COEF_FRAC));
    for (int l = 1; l <= LV; l++)
      for (int i = 0; i < (NNN3D >> l); i++)
        lvl[l][i] <= lvl[l-1][2*i] + lvl[l-1][2*i+1];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vp <= '0;
    else        vp <= {vp[LV-1:0], in_valid};

  localparam logic signed [SW-1:0] MAXV = SW'(32'sh7fffffff);
  localparam logic signed [SW-1:0] MINV = -SW'(32'sh7fffffff) - 1;

  always_comb begin
    if (lvl[LV][0] > MAXV)      force_out = word_t'(MAXV);
    else if (lvl[LV][0] < MINV) force_out = word_t'(MINV);
    else                        force_out = word_t'(lvl[LV][0]);
  end
  assign out_valid = vp[LV];
endmodule
