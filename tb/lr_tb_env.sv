// lr_tb_env: end-to-end test environment for lr_top, shared by the reduced
// size test (tb_lr_top) and the default size test (tb_lr_full).
//
// It loads a Green's table G(k) = GAMP / (1 + |k|^2) (k the wrapped frequency
// index), then runs ITER LR iterations with random particles and checks every
// particle force against a floating point model of the same algorithm:
//   Q   = sum_p q * phi(ox) phi(oy) phi(oz) spread on the 4x4x4 box at floor-1
//   Phi = real( IDFT3( G * DFT3(Q) / NG ) ), IDFT3 without normalisation
//   F_d = sum_box Phi * q * (basis with the derivative in dimension d)
// The first iteration loads fewer particles than grid points (grid clearing
// phase) with a host that is often not ready (force back-pressure); the
// particles come in runs sharing a grid cell so charge mapping must stall.
// Mechanisms are counted and a mechanism that never happens is a failure.
module lr_tb_env #(
  parameter bit FULL  = 1'b0,  // 1: lr_top with its default parameters
  parameter int LG    = 3,     // log2 grid size per dimension when not FULL
  parameter int NPART = 600,
  parameter int NP1   = 100,   // particles in iteration 1
  parameter int NP2   = 600,   // particles in iteration 2
  parameter longint MAXCYC = 2_000_000
) ();
  import lr_pkg::*;

  localparam int G   = 1 << LG;
  localparam int NG  = G * G * G;
  localparam real GAMP = 100.0;
  localparam real SC   = real'(1 << COEF_FRAC);
  localparam real SG   = real'(1 << GRID_FRAC);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic p_valid = 0, p_ready, p_last = 0;
  logic [LG-1:0] p_ix = 0, p_iy = 0, p_iz = 0;
  logic [OFS_W-1:0] p_ox = 0, p_oy = 0, p_oz = 0;
  word_t p_q = 0;
  logic f_valid, f_ready = 0, f_last;
  word_t f_x, f_y, f_z;
  logic g_ld_en = 0;
  logic [LG-1:0] g_ld_x = 0, g_ld_y = 0, g_ld_z = 0;
  word_t g_ld_data = 0;
  logic [2:0] phase, fft_pass;
  logic cm_stall;

  if (FULL) begin : g_full
    lr_top dut (.*);
  end else begin : g_small
    lr_top #(.NPART(NPART), .LGX(LG), .LGY(LG), .LGZ(LG)) dut (.*);
  end

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    while (cyc < MAXCYC) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish in %0d cycles", MAXCYC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism and timing counters ----------------
  int n_stall = 0, n_clear = 0, n_bp = 0, n_green = 0, n_inv = 0;
  int ph_cycles [5];
  int pass_cycles [6];
  always @(posedge clk) if (rst_n) begin
    if (cm_stall) n_stall++;
    if (phase == 3'd1) n_clear++;
    if (f_valid && !f_ready) n_bp++;
    if (phase == 3'd3 && fft_pass == 3'd2) n_green++;
    if (phase == 3'd3 && fft_pass >= 3'd3) n_inv++;
    if (phase <= 3'd4) ph_cycles[phase]++;
    if (phase == 3'd3) pass_cycles[fft_pass]++;
  end

  // ---------------- reference model ----------------
  real gre [NG];
  real qr [NG], qi [NG];
  int  pix [NPART], piy [NPART], piz [NPART];
  int  pox [NPART], poy [NPART], poz [NPART];
  int  pq [NPART];

  function automatic int gidx(int x, int y, int z);
    return ((x % G + G) % G) + G * (((y % G + G) % G) + G * ((z % G + G) % G));
  endfunction

  function automatic real basis(int i, real o, bit der);
    if (!der)
      case (i)
        0: return -0.5 * o * o * o + o * o - 0.5 * o;
        1: return 1.5 * o * o * o - 2.5 * o * o + 1.0;
        2: return -1.5 * o * o * o + 2.0 * o * o + 0.5 * o;
        default: return 0.5 * o * o * o - 0.5 * o * o;
      endcase
    else
      case (i)
        0: return -1.5 * o * o + 2.0 * o - 0.5;
        1: return 4.5 * o * o - 5.0 * o;
        2: return -4.5 * o * o + 4.0 * o + 0.5;
        default: return 1.5 * o * o - o;
      endcase
  endfunction

  // In-place 1D DFT along dimension d of the whole grid, sign -1 forward.
  task automatic dft_dim(int d, real sgn, real scale);
    real tr [], ti [];
    tr = new[G];
    ti = new[G];
    for (int a = 0; a < G; a++)
      for (int b = 0; b < G; b++) begin
        for (int k = 0; k < G; k++) begin
          real sr, si;
          sr = 0.0; si = 0.0;
          for (int n = 0; n < G; n++) begin
            int id;
            real ang;
            id = (d == 0) ? gidx(n, a, b) : (d == 1) ? gidx(a, n, b) : gidx(a, b, n);
            ang = sgn * 2.0 * 3.14159265358979323846 * real'(n * k) / real'(G);
            sr += qr[id] * $cos(ang) - qi[id] * $sin(ang);
            si += qr[id] * $sin(ang) + qi[id] * $cos(ang);
          end
          tr[k] = sr * scale;
          ti[k] = si * scale;
        end
        for (int k = 0; k < G; k++) begin
          int id;
          id = (d == 0) ? gidx(k, a, b) : (d == 1) ? gidx(a, k, b) : gidx(a, b, k);
          qr[id] = tr[k];
          qi[id] = ti[k];
        end
      end
  endtask

  real efx [NPART], efy [NPART], efz [NPART];
  real fmax;

  task automatic reference(int np);
    for (int i = 0; i < NG; i++) begin qr[i] = 0.0; qi[i] = 0.0; end
    for (int p = 0; p < np; p++)
      for (int c = 0; c < 64; c++) begin
        int x, y, z;
        x = c % 4; y = (c / 4) % 4; z = c / 16;
        qr[gidx(pix[p] - 1 + x, piy[p] - 1 + y, piz[p] - 1 + z)] +=
          real'(pq[p]) / SC * basis(x, real'(pox[p]) / SC, 0) * basis(y, real'(poy[p]) / SC, 0)
          * basis(z, real'(poz[p]) / SC, 0);
      end
    for (int d = 0; d < 3; d++) dft_dim(d, -1.0, 1.0 / real'(G));
    for (int i = 0; i < NG; i++) begin qr[i] *= gre[i]; qi[i] *= gre[i]; end
    for (int d = 2; d >= 0; d--) dft_dim(d, 1.0, 1.0);
    fmax = 0.0;
    for (int p = 0; p < np; p++) begin
      real f [3];
      for (int d = 0; d < 3; d++) begin
        f[d] = 0.0;
        for (int c = 0; c < 64; c++) begin
          int x, y, z;
          x = c % 4; y = (c / 4) % 4; z = c / 16;
          f[d] += qr[gidx(pix[p] - 1 + x, piy[p] - 1 + y, piz[p] - 1 + z)] * real'(pq[p]) / SC
                  * basis(x, real'(pox[p]) / SC, d == 0) * basis(y, real'(poy[p]) / SC, d == 1)
                  * basis(z, real'(poz[p]) / SC, d == 2);
        end
        if (f[d] > fmax) fmax = f[d];
        if (-f[d] > fmax) fmax = -f[d];
      end
      efx[p] = f[0]; efy[p] = f[1]; efz[p] = f[2];
    end
  endtask

  // ---------------- stimulus ----------------
  task automatic make_particles(int np);
    for (int p = 0; p < np; p++) begin
      if (p % 8 != 0 && p > 0) begin
        // runs of particles in the same cell: overlapping boxes
        pix[p] = pix[p-1]; piy[p] = piy[p-1]; piz[p] = piz[p-1];
      end else begin
        pix[p] = $urandom % G; piy[p] = $urandom % G; piz[p] = $urandom % G;
      end
      pox[p] = $urandom % (1 << OFS_W);
      poy[p] = $urandom % (1 << OFS_W);
      poz[p] = $urandom % (1 << OFS_W);
      pq[p]  = int'($urandom % (2 << COEF_FRAC)) - (1 << COEF_FRAC);
    end
  endtask

  task automatic run_iteration(int np, bit bp);
    int got, ph0, ph2, ph3, ph4;
    longint t_start;
    make_particles(np);
    reference(np);
    for (int i = 0; i < 5; i++) ph_cycles[i] = 0;
    for (int i = 0; i < 6; i++) pass_cycles[i] = 0;
    got = 0;
    t_start = cyc;
    fork
      begin
        for (int p = 0; p < np; p++) begin
          p_valid <= 1'b1;
          p_last  <= (p == np - 1);
          p_ix <= LG'(pix[p]); p_iy <= LG'(piy[p]); p_iz <= LG'(piz[p]);
          p_ox <= OFS_W'(pox[p]); p_oy <= OFS_W'(poy[p]); p_oz <= OFS_W'(poz[p]);
          p_q  <= word_t'(pq[p]);
          @(posedge clk);
          while (!p_ready) @(posedge clk);
        end
        p_valid <= 1'b0;
        p_last  <= 1'b0;
      end
      begin
        while (got < np) begin
          f_ready <= bp ? ($urandom % 3 == 0) : 1'b1;
          @(posedge clk);
          if (f_valid && f_ready) begin
            real ex, ey, ez, tol;
            ex = efx[got]; ey = efy[got]; ez = efz[got];
            tol = 1e-3 * fmax;
            checks++;
            if (rabs(real'(f_x) / SG - ex) > tol || rabs(real'(f_y) / SG - ey) > tol ||
                rabs(real'(f_z) / SG - ez) > tol) begin
              failures++;
              if (failures < 10)
                $display("particle %0d: force (%f %f %f) expected (%f %f %f)", got,
                         real'(f_x) / SG, real'(f_y) / SG, real'(f_z) / SG, ex, ey, ez);
            end
            checks++;
            if (f_last != (got == np - 1)) begin
              failures++;
              $display("particle %0d: last flag %0d", got, f_last);
            end
            got++;
          end
        end
        f_ready <= 1'b0;
      end
    join
    $display("iteration with %0d particles: %0d cycles; load %0d, clear %0d, charge map %0d, FFT %0d, force %0d; stalls %0d; max |F| %f",
             np, cyc - t_start, ph_cycles[0], ph_cycles[1], ph_cycles[2], ph_cycles[3], ph_cycles[4],
             n_stall, fmax);
    // charge mapping runs at one particle per cycle apart from stalls
    ph2 = ph_cycles[2];
    checks++;
    if (ph2 - n_stall_iter(np) > np + 16 || ph2 < np) begin
      failures++;
      $display("charge mapping took %0d cycles for %0d particles", ph2, np);
    end
    // each FFT pass: NG/64 cycles of streaming plus fixed latencies
    for (int ps = 0; ps < 6; ps++) begin
      int lat;
      lat = NG / 64 + 3 + GRID_RD_LAT + fft_latency(LG, LG) + (ps == 2 ? 1 : 0) + GRID_WR_LAT + 2;
      checks++;
      if (pass_cycles[ps] != lat) begin
        failures++;
        $display("FFT pass %0d took %0d cycles, expected %0d", ps, pass_cycles[ps], lat);
      end
    end
    // without back-pressure, forces leave at one particle per cycle
    if (!bp) begin
      checks++;
      if (ph_cycles[4] > np + 24) begin
        failures++;
        $display("force phase took %0d cycles for %0d particles", ph_cycles[4], np);
      end
    end
  endtask

  int stall_mark = 0;
  function automatic int n_stall_iter(int np);
    int s;
    s = n_stall - stall_mark;
    stall_mark = n_stall;
    return s;
  endfunction

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // Green's table
    for (int z = 0; z < G; z++)
      for (int y = 0; y < G; y++)
        for (int x = 0; x < G; x++) begin
          int kx, ky, kz;
          real gv;
          kx = (x <= G / 2) ? x : x - G;
          ky = (y <= G / 2) ? y : y - G;
          kz = (z <= G / 2) ? z : z - G;
          gv = GAMP / (1.0 + real'(kx * kx + ky * ky + kz * kz));
          g_ld_en <= 1'b1;
          g_ld_x <= LG'(x); g_ld_y <= LG'(y); g_ld_z <= LG'(z);
          g_ld_data <= word_t'($rtoi(gv * real'(1 << GREEN_FRAC)));
          gre[gidx(x, y, z)] = real'($rtoi(gv * real'(1 << GREEN_FRAC))) / real'(1 << GREEN_FRAC);
          @(posedge clk);
        end
    g_ld_en <= 1'b0;
    @(posedge clk);
    run_iteration(NP1, 1'b1);
    repeat (5) @(posedge clk);
    run_iteration(NP2, 1'b0);
    // every mechanism must have happened
    checks += 5;
    if (n_stall == 0) begin failures++; $display("no charge mapping stall"); end
    if (n_clear == 0) begin failures++; $display("no grid clearing phase"); end
    if (n_bp == 0)    begin failures++; $display("no force back-pressure"); end
    if (n_green == 0) begin failures++; $display("no Green's pass"); end
    if (n_inv == 0)   begin failures++; $display("no inverse pass"); end
    $display("mechanisms: stall cycles %0d, clear cycles %0d, back-pressure cycles %0d, Green's pass cycles %0d, inverse pass cycles %0d",
             n_stall, n_clear, n_bp, n_green, n_inv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
