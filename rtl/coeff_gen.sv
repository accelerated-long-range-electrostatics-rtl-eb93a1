// coeff_gen: interpolation coefficient generator.
//
// For one particle it evaluates the four third-order basis polynomials
// phi_0..phi_3 of its offset in each dimension, and spreads the charge over the
// 64 nearest grid points:  w[p] = q * B_x[px] * B_y[py] * B_z[pz],
// p = px + 4*py + 16*pz.  Polynomial i belongs to grid point floor-1+i.  The same
// module serves charge mapping (DERIV_DIM = -1) and the three force
// coefficient generators (DERIV_DIM = 0, 1 or 2: that dimension uses the
// derivative polynomials instead).  The polynomials are parameters, given as
// cubic coefficients {c3, c2, c1, c0}; generate statements drop a multiplier
// whose coefficient is zero and replace one whose coefficient is one by a
// register, as the design description does for its floating point units.
// The default polynomials are the description's basis functions and their
// derivatives; the arithmetic is fixed point (own choice) with 27 fraction bits.
// The description prints the derivative of phi_1 with a constant term of +1;
// the true derivative of its phi_1 has none (and the four derivatives must
// sum to zero, as they do in its alternative OpenMM set), so the constant
// here is 0.
//
// Pipeline (one particle per cycle, no stall): oi^2 | oi^3 | coefficient
// products | polynomial sums | B_x*B_y and q*B_z | final product.  Latency 6
// cycles from in_valid to out_valid.  Products that overflow 32 bits wrap.
module coeff_gen
  import lr_pkg::*;
#(
  parameter int    DERIV_DIM = -1,
  parameter logic [3:0][3:0][31:0] PHI = {
    to_coef(-0.5), to_coef( 1.0), to_coef(-0.5), to_coef(0.0),
    to_coef( 1.5), to_coef(-2.5), to_coef( 0.0), to_coef(1.0),
    to_coef(-1.5), to_coef( 2.0), to_coef( 0.5), to_coef(0.0),
    to_coef( 0.5), to_coef(-0.5), to_coef( 0.0), to_coef(0.0)},
  parameter logic [3:0][3:0][31:0] DPHI = {
    to_coef(0.0), to_coef(-1.5), to_coef( 2.0), to_coef(-0.5),
    to_coef(0.0), to_coef( 4.5), to_coef(-5.0), to_coef( 0.0),
    to_coef(0.0), to_coef(-4.5), to_coef( 4.0), to_coef( 0.5),
    to_coef(0.0), to_coef( 1.5), to_coef(-1.0), to_coef( 0.0)}
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [OFS_W-1:0] in_ofs [3],   // X, Y, Z offsets, Q0.27
  input  word_t            in_q,         // charge, Q5.27
  output logic             out_valid,
  output word_t            out_w [NNN3D]
);

  localparam int    LAT = 6;
  localparam word_t ONE = word_t'(1 << COEF_FRAC);

  // valid pipeline
  logic [LAT-1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LAT-2:0], in_valid};
  assign out_valid = vpipe[LAT-1];

  // stage 1 / 2: powers of the offset
  word_t o1_s1 [3], o2_s1 [3];
  word_t o1_s2 [3], o2_s2 [3], o3_s2 [3];
  word_t q_s [4];

  always_ff @(posedge clk) begin
    for (int d = 0; d < 3; d++) begin
      o1_s1[d] <= word_t'({5'b0, in_ofs[d]});
      o2_s1[d] <= fxmul(word_t'({5'b0, in_ofs[d]}), word_t'({5'b0, in_ofs[d]}), COEF_FRAC);
      o1_s2[d] <= o1_s1[d];
      o2_s2[d] <= o2_s1[d];
      o3_s2[d] <= fxmul(o2_s1[d], o1_s1[d], COEF_FRAC);
    end
    q_s[0] <= in_q;
    for (int i = 1; i < 4; i++) q_s[i] <= q_s[i-1];
  end

  // stages 3 and 4: coefficient products and polynomial sums
  word_t t_s3 [3][4][3];  // [dim][poly][term c3,c2,c1]
  word_t b_s4 [3][4];     // basis values

  for (genvar d = 0; d < 3; d++) begin : g_dim
    for (genvar i = 0; i < 4; i++) begin : g_poly
      for (genvar j = 0; j < 3; j++) begin : g_term
        localparam word_t C = word_t'((d == DERIV_DIM) ? DPHI[3-i][3-j] : PHI[3-i][3-j]);
        if (C == 0) begin : g_zero
          always_ff @(posedge clk) t_s3[d][i][j] <= '0;
        end else if (C == ONE) begin : g_one
          always_ff @(posedge clk)
            t_s3[d][i][j] <= (j == 0) ? o3_s2[d] : (j == 1) ? o2_s2[d] : o1_s2[d];
        end else begin : g_mul
          always_ff @(posedge clk)
            t_s3[d][i][j] <= fxmul(C, (j == 0) ? o3_s2[d] : (j == 1) ? o2_s2[d] : o1_s2[d],
                                   COEF_FRAC);
        end
      end
      localparam word_t C0 = word_t'((d == DERIV_DIM) ? DPHI[3-i][0] : PHI[3-i][0]);
      always_ff @(posedge clk)
        b_s4[d][i] <= t_s3[d][i][0] + t_s3[d][i][1] + t_s3[d][i][2] + C0;
    end
  end

  // stage 5: X*Y products and charge times Z
  word_t xy_s5 [16];
  word_t qz_s5 [4];
  always_ff @(posedge clk) begin
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        xy_s5[x + 4*y] <= fxmul(b_s4[0][x], b_s4[1][y], COEF_FRAC);
    for (int z = 0; z < 4; z++)
      qz_s5[z] <= fxmul(q_s[3], b_s4[2][z], COEF_FRAC);
  end

  // stage 6: all 64 products
  always_ff @(posedge clk)
    for (int p = 0; p < NNN3D; p++)
      out_w[p] <= fxmul(xy_s5[p % 16], qz_s5[p / 16], COEF_FRAC);

endmodule
