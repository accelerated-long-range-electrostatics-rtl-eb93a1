// tb_coeff_gen: self-checking test of the basis-function coefficient unit.
// Two instances are driven with the same random offsets and charges: one
// builds charge-spreading weights, one builds the X-derivative weights used
// for the force along X.  Each of the 64 outputs is compared with a
// floating-point evaluation of the third-order basis functions (and their
// derivatives) written out independently here.  Also checks the 6-cycle
// latency, the valid pipeline, and that the 64 charge weights sum to q.
module tb_coeff_gen;
  import lr_pkg::*;

  localparam int LAT = 6;

  logic             clk = 0, rst_n = 0;
  logic             in_valid, v_c, v_d;
  logic [OFS_W-1:0] in_ofs [3];
  word_t            in_q;
  word_t            w_c [NNN3D], w_d [NNN3D];

  int checks = 0, failures = 0;
  int cyc = 0;
  real    q_hist [$], ox_hist [$], oy_hist [$], oz_hist [$];
  int     t_hist [$];

  coeff_gen #(.DERIV_DIM(-1)) u_c (.clk, .rst_n, .in_valid, .in_ofs, .in_q,
                                   .out_valid(v_c), .out_w(w_c));
  coeff_gen #(.DERIV_DIM(0))  u_d (.clk, .rst_n, .in_valid, .in_ofs, .in_q,
                                   .out_valid(v_d), .out_w(w_d));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // Basis function i (0..3) of the cell offset o, third order.
  function automatic real phi(int i, real o);
    case (i)
      0: return 0.5 * (1.0 - o) * (1.0 - o) * (0.0 - o) ;  // -(1-o)^2 o / 2
      1: return 1.0 - 2.5 * o * o + 1.5 * o * o * o;
      2: return 0.5 * o + 2.0 * o * o - 1.5 * o * o * o;
      default: return 0.5 * o * o * (o - 1.0);
    endcase
  endfunction

  function automatic real dphi(int i, real o);
    case (i)
      0: return -0.5 + 2.0 * o - 1.5 * o * o;
      1: return -5.0 * o + 4.5 * o * o;
      2: return 0.5 + 4.0 * o - 4.5 * o * o;
      default: return 1.5 * o * o - o;
    endcase
  endfunction

  always @(negedge clk) begin
    cyc++;
    checks++;
    if (v_c !== v_d) begin
      failures++;
      $display("valid outputs differ");
    end
    if (rst_n && v_c) begin
      real q, o [3], sum, ec, ed, sc;
      int t;
      q = q_hist.pop_front();
      o[0] = ox_hist.pop_front();
      o[1] = oy_hist.pop_front();
      o[2] = oz_hist.pop_front();
      t = t_hist.pop_front();
      checks++;
      if (cyc - t != LAT) begin
        failures++;
        $display("latency %0d, expected %0d", cyc - t, LAT);
      end
      sum = 0.0;
      sc  = real'(1 << COEF_FRAC);
      for (int p = 0; p < NNN3D; p++) begin
        int x, y, z;
        x = p % 4; y = (p / 4) % 4; z = p / 16;
        ec = q * phi(x, o[0]) * phi(y, o[1]) * phi(z, o[2]);
        ed = q * dphi(x, o[0]) * phi(y, o[1]) * phi(z, o[2]);
        sum += real'(w_c[p]) / sc;
        checks += 2;
        if (rabs(real'(w_c[p]) / sc - ec) > 1e-7 * (1.0 + rabs(q))) begin
          failures++;
          if (failures < 10) $display("charge w[%0d] %f exp %f", p, real'(w_c[p]) / sc, ec);
        end
        if (rabs(real'(w_d[p]) / sc - ed) > 1e-7 * (1.0 + rabs(q))) begin
          failures++;
          if (failures < 10) $display("deriv w[%0d] %f exp %f", p, real'(w_d[p]) / sc, ed);
        end
      end
      checks++;
      if (rabs(sum - q) > 1e-6 * (1.0 + rabs(q))) begin
        failures++;
        $display("weights sum to %f, charge %f", sum, q);
      end
    end
  end

  initial begin
    in_valid = 0;
    in_ofs = '{default: '0};
    in_q = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      #1;
      in_valid = (it < 480) && (($urandom % 4) != 0);
      for (int d = 0; d < 3; d++) begin
        // include the extreme offsets 0 and 1-2**-27
        if (it == 1)      in_ofs[d] = '0;
        else if (it == 2) in_ofs[d] = '1;
        else              in_ofs[d] = OFS_W'($urandom);
      end
      in_q = word_t'($signed($urandom) >>> 3);   // |q| < 2
      if (in_valid) begin
        q_hist.push_back(real'(in_q) / real'(1 << COEF_FRAC));
        ox_hist.push_back(real'(in_ofs[0]) / real'(1 << COEF_FRAC));
        oy_hist.push_back(real'(in_ofs[1]) / real'(1 << COEF_FRAC));
        oz_hist.push_back(real'(in_ofs[2]) / real'(1 << COEF_FRAC));
        t_hist.push_back(cyc);
      end
    end
    checks++;
    if (q_hist.size() != 0) begin
      failures++;
      $display("%0d results missing", q_hist.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
