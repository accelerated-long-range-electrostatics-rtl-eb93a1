// lr_sequencer: control sequencer of the LR accelerator.
//
// Runs one LR iteration as a sequence of phases:
//   LOAD   particles arrive from the host; each accepted particle also clears
//          one grid point (grid point number = particle number), as in the
//          design description.
//   CLEAR  only if fewer particles than grid points arrived: the remaining
//          grid points are cleared one per cycle (own addition, so that a
//          small particle set still starts from an empty grid).
//   CMAP   charge mapping, one particle per cycle: read the particle, read its
//          4x4x4 box of grid points, add the charge coefficients, write back.
//          A particle whose box overlaps the box of a particle still in the
//          read-modify-write loop (issued in the last 8 cycles) is held: the
//          pipeline stalls, as the description's hardware does.
//   FFT    six passes of 1D FFTs over the grid: forward X, Y, Z (the Z pass
//          multiplies by the Green's function before writing back), then
//          inverse Z, Y, X.  Inverse passes exchange real and imaginary parts
//          before and after the forward FFT pipelines (own choice; the
//          description instead reverses the output order of a forward FFT).
//   FORCE  force computation, one particle per cycle, held back whenever the
//          force output buffer could not take the result (credit count).
//
// FFT access pattern (the staggered access-cluster slices): for a pass along
// dimension D the 64 ports form four 2D slices of 16 ports (port coordinate
// pD = k).  Each slice feeds 16 FFT pipelines with a 4x4 bundle of grid lines,
// one point per line per cycle, and works through its share of the bundles
// back to back.  Slice k starts (4-k)%4 cycles after slice 0, so at any time
// the four slices use four different neighbours along D and the whole
// access is one toroidal shift by t%4 along D.  The same schedule, delayed by
// the read latency, the FFT latency and (Z pass) the Green's multiply,
// gives the write-back addresses.
//
// Timing constants: grid read 7 cycles, coefficient generator 6, charge
// accumulation 1, force MAC 7.  All counters and the phase register are reset
// by rst_n (asynchronous, active low).
module lr_sequencer
  import lr_pkg::*;
#(
  parameter int NPART = 32768,
  parameter int LGX   = 5,
  parameter int LGY   = 5,
  parameter int LGZ   = 5,
  parameter int FIFO_DEPTH = 32,
  localparam int AW   = LGX + LGY + LGZ - 6,
  localparam int PA   = $clog2(NPART),
  localparam int CW   = $clog2(NPART + 1),
  localparam int LOGN = (LGX > LGY) ? ((LGX > LGZ) ? LGX : LGZ) : ((LGY > LGZ) ? LGY : LGZ),
  localparam int LW   = $clog2(LOGN + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // particle memory
  output logic             pm_start,
  output logic             pm_load_en,
  input  logic             pm_take,        // a particle beat was accepted
  input  logic [CW-1:0]    pm_count,
  input  logic             pm_load_done,
  output logic             pm_rd_en,
  output logic [PA-1:0]    pm_rd_addr,
  input  logic [LGX-1:0]   pm_ix,
  input  logic [LGY-1:0]   pm_iy,
  input  logic [LGZ-1:0]   pm_iz,
  // grid memory read cluster
  output logic [NNN3D-1:0] g_rd_en,
  output logic [AW-1:0]    g_rd_addr  [NNN3D],
  output logic [1:0]       g_rd_shift [3],
  // grid memory write cluster
  output logic [NNN3D-1:0] g_wr_en,
  output logic [AW-1:0]    g_wr_addr  [NNN3D],
  output logic [1:0]       g_wr_shift [3],
  output logic [1:0]       g_wr_sel,       // 0 clear, 1 charge, 2 FFT, 3 FFT x Green
  // Green's table read cluster
  output logic [NNN3D-1:0] gr_rd_en,
  output logic [AW-1:0]    gr_rd_addr  [NNN3D],
  output logic [1:0]       gr_rd_shift [3],
  // FFT pipelines
  output logic [LW-1:0]    fft_len,
  output logic             fft_inv,
  output logic [NNN3D-1:0] fft_in_valid,
  output logic [LOGN-1:0]  fft_in_idx [NNN3D],
  // coefficient generators
  output logic             cm_issue,       // charge coefficient generator input valid
  output logic             fc_issue,       // force coefficient generators input valid
  output logic             fc_last,        // issued particle is the last one
  // force output buffer
  input  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count,
  input  logic             mac_valid,
  input  logic             out_last_done,  // last force accepted by the host
  // status
  output logic             cm_stall,       // a charge-mapping hazard stall this cycle
  output logic [2:0]       phase_o,
  output logic [2:0]       fft_pass_o
);

  typedef enum logic [2:0] {PH_LOAD, PH_CLEAR, PH_CMAP, PH_FFT, PH_FORCE} phase_t;

  localparam int NG       = 1 << (LGX + LGY + LGZ);
  localparam int SPAN     = NG / NNN3D;     // cycles each slice is busy in a pass
  localparam int CM_WB    = GRID_RD_LAT + 1; // issue -> write-back request
  localparam int GX = 1 << LGX, GY = 1 << LGY, GZ = 1 << LGZ;

  phase_t phase;
  logic [2:0] pass;          // FFT pass 0..5
  int         t;             // time within an FFT pass or a drain
  logic [$clog2(NG+1)-1:0] clr_ptr;
  logic [CW-1:0] rd_ptr;

  assign phase_o    = phase;
  assign fft_pass_o = pass;

  // ------------------------------------------------------------------
  // FFT pass description
  function automatic int pass_dim(logic [2:0] ps);
    case (ps)
      3'd0, 3'd5: return 0;
      3'd1, 3'd4: return 1;
      default:    return 2;
    endcase
  endfunction

  function automatic int lg_of(int d);
    return (d == 0) ? LGX : (d == 1) ? LGY : LGZ;
  endfunction

  // Grid coordinate reached by port p at pass time tt; returns 0 if idle.
  function automatic logic fft_point(logic [2:0] ps, int tt, int p,
                                     output int cx, output int cy, output int cz,
                                     output logic [LOGN-1:0] n);
    int d, a, b, lg, k, sk, u, j, gb, na, pa, pb, ca, cb, nn;
    int c [3];
    d  = pass_dim(ps);
    a  = (d == 0) ? 1 : 0;
    b  = (d == 2) ? 1 : 2;
    lg = lg_of(d);
    k  = (p >> (2 * d)) & 3;
    pa = (p >> (2 * a)) & 3;
    pb = (p >> (2 * b)) & 3;
    sk = (4 - k) % 4;
    u  = tt - sk;
    nn = u & ((1 << lg) - 1);
    n  = LOGN'(nn);
    j  = u >>> lg;
    gb = 4 * j + k;
    na = (1 << lg_of(a)) / 4;
    ca = 4 * (gb % na) + pa;
    cb = 4 * (gb / na) + pb;
    c[d] = nn;
    c[a] = ca;
    c[b] = cb;
    cx = c[0]; cy = c[1]; cz = c[2];
    return (u >= 0) && (u < SPAN);
  endfunction

  function automatic logic [AW-1:0] nbhd(int cx, int cy, int cz);
    return AW'((((cz & (GZ - 1)) >> 2) << (LGX + LGY - 4)) | (((cy & (GY - 1)) >> 2) << (LGX - 2))
               | ((cx & (GX - 1)) >> 2));
  endfunction

  // Latency from a pass's read request to its write-back request.
  function automatic int wb_delay(logic [2:0] ps);
    return GRID_RD_LAT + fft_latency(LOGN, lg_of(pass_dim(ps))) + ((ps == 3'd2) ? 1 : 0);
  endfunction

  // ------------------------------------------------------------------
  // Charge mapping / force particle stage
  logic                s1_valid;
  logic [LGX-1:0]      bx [CM_WB];   // in-flight boxes (0 = issued last cycle)
  logic [LGY-1:0]      by [CM_WB];
  logic [LGZ-1:0]      bz [CM_WB];
  logic [CM_WB-1:0]    bv;
  logic [LGX-1:0]      cur_bx;
  logic [LGY-1:0]      cur_by;
  logic [LGZ-1:0]      cur_bz;
  logic                hazard, issue, advance, credit_ok;
  int                  inflight;

  assign cur_bx = pm_ix - 1'b1;   // box starts one grid point below the floor point
  assign cur_by = pm_iy - 1'b1;
  assign cur_bz = pm_iz - 1'b1;

  function automatic logic near(int a, int b, int g);
    int dd;
    dd = ((a - b) % g + g) % g;
    return (dd <= 3) || (dd >= g - 3);
  endfunction

  always_comb begin
    hazard = 1'b0;
    for (int i = 0; i < CM_WB; i++)
      if (bv[i] && near(int'(cur_bx), int'(bx[i]), GX) && near(int'(cur_by), int'(by[i]), GY)
          && near(int'(cur_bz), int'(bz[i]), GZ))
        hazard = 1'b1;
  end

  assign credit_ok = (inflight + int'(fifo_count)) < FIFO_DEPTH;
  assign issue     = s1_valid && ((phase == PH_CMAP) ? !hazard
                                : (phase == PH_FORCE) ? credit_ok : 1'b0);
  assign advance   = ((phase == PH_CMAP) || (phase == PH_FORCE)) && (!s1_valid || issue);
  assign pm_rd_en  = advance && (rd_ptr < pm_count);
  assign pm_rd_addr = PA'(rd_ptr);
  assign cm_issue  = issue && (phase == PH_CMAP);
  assign fc_issue  = issue && (phase == PH_FORCE);
  assign cm_stall  = s1_valid && (phase == PH_CMAP) && hazard;

  // last-particle tag, aligned with the issue
  logic [CW-1:0] s1_idx;
  assign fc_last = fc_issue && (s1_idx == pm_count - 1'b1);

  // ------------------------------------------------------------------
  // Phase control
  logic take_clear;
  assign take_clear = (phase == PH_LOAD) && pm_take && (clr_ptr < ($clog2(NG+1))'(NG));
  assign pm_load_en = (phase == PH_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= PH_LOAD;
      pass     <= '0;
      t        <= 0;
      clr_ptr  <= '0;
      rd_ptr   <= '0;
      s1_valid <= 1'b0;
      s1_idx   <= '0;
      bv       <= '0;
      inflight <= 0;
      pm_start <= 1'b1;
    end else begin
      pm_start <= 1'b0;
      // in-flight charge boxes
      bv <= {bv[CM_WB-2:0], cm_issue};
      if (mac_valid && !fc_issue) inflight <= inflight - 1;
      else if (fc_issue && !mac_valid) inflight <= inflight + 1;
      if (advance) begin
        s1_valid <= (rd_ptr < pm_count);
        s1_idx   <= rd_ptr;
        if (rd_ptr < pm_count) rd_ptr <= rd_ptr + 1'b1;
      end
      case (phase)
        PH_LOAD: begin
          if (take_clear) clr_ptr <= clr_ptr + 1'b1;
          if (pm_load_done) begin
            phase  <= PH_CLEAR;
            rd_ptr <= '0;
          end
        end
        PH_CLEAR: begin
          if (clr_ptr < ($clog2(NG+1))'(NG)) clr_ptr <= clr_ptr + 1'b1;
          else begin
            phase <= PH_CMAP;
            t     <= 0;
          end
        end
        PH_CMAP: begin
          // done when every particle was issued and the last write-back landed
          if (rd_ptr == pm_count && !s1_valid) begin
            t <= t + 1;
            if (t == CM_WB + GRID_WR_LAT + 1) begin
              phase <= PH_FFT;
              pass  <= '0;
              t     <= 0;
            end
          end
        end
        PH_FFT: begin
          t <= t + 1;
          if (t == SPAN + 3 + wb_delay(pass) + GRID_WR_LAT + 1) begin
            t <= 0;
            if (pass == 3'd5) begin
              phase  <= PH_FORCE;
              rd_ptr <= '0;
            end else pass <= pass + 1'b1;
          end
        end
        PH_FORCE: begin
          if (out_last_done) begin
            phase   <= PH_LOAD;
            clr_ptr <= '0;
            pm_start <= 1'b1;
          end
        end
        default: phase <= PH_LOAD;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    bx[0] <= cur_bx;
    by[0] <= cur_by;
    bz[0] <= cur_bz;
    for (int i = 1; i < CM_WB; i++) begin
      bx[i] <= bx[i-1];
      by[i] <= by[i-1];
      bz[i] <= bz[i-1];
    end
  end

  // ------------------------------------------------------------------
  // Cluster requests
  always_comb begin
    int cx, cy, cz, d, clr;
    logic [LOGN-1:0] n;
    logic act;
    cx = 0; cy = 0; cz = 0; n = 0; clr = 0; act = 1'b0;
    d = pass_dim(pass);
    fft_len = LW'(lg_of(d));
    fft_inv = (pass >= 3'd3);
    g_rd_en = '0;
    g_wr_en = '0;
    gr_rd_en = '0;
    fft_in_valid = '0;
    g_rd_shift  = '{default: 2'd0};
    g_wr_shift  = '{default: 2'd0};
    gr_rd_shift = '{default: 2'd0};
    g_wr_sel = 2'd0;
    for (int p = 0; p < NNN3D; p++) begin
      g_rd_addr[p]  = '0;
      g_wr_addr[p]  = '0;
      gr_rd_addr[p] = '0;
      fft_in_idx[p] = '0;
    end
    case (phase)
      PH_LOAD, PH_CLEAR: begin
        // clear grid point clr_ptr through the port equal to its neighbour ID
        clr = int'(clr_ptr);
        cx = clr % GX;
        cy = (clr / GX) % GY;
        cz = clr / (GX * GY);
        for (int p = 0; p < NNN3D; p++) begin
          g_wr_en[p]   = ((phase == PH_LOAD) ? take_clear : (clr < NG))
                         && (p == (cx & 3) + 4 * (cy & 3) + 16 * (cz & 3));
          g_wr_addr[p] = nbhd(cx, cy, cz);
        end
      end
      PH_CMAP, PH_FORCE: begin
        g_rd_shift = '{cur_bx[1:0], cur_by[1:0], cur_bz[1:0]};
        g_wr_shift = '{bx[CM_WB-1][1:0], by[CM_WB-1][1:0], bz[CM_WB-1][1:0]};
        g_wr_sel   = 2'd1;
        for (int p = 0; p < NNN3D; p++) begin
          g_rd_en[p]   = issue;
          g_rd_addr[p] = nbhd(int'(cur_bx) + (p & 3), int'(cur_by) + ((p >> 2) & 3),
                              int'(cur_bz) + (p >> 4));
          g_wr_en[p]   = bv[CM_WB-1];
          g_wr_addr[p] = nbhd(int'(bx[CM_WB-1]) + (p & 3), int'(by[CM_WB-1]) + ((p >> 2) & 3),
                              int'(bz[CM_WB-1]) + (p >> 4));
        end
      end
      PH_FFT: begin
        g_wr_sel = (pass == 3'd2) ? 2'd3 : 2'd2;
        g_rd_shift[d]  = 2'(t);
        g_wr_shift[d]  = 2'(t - wb_delay(pass));
        gr_rd_shift[d] = 2'(t - fft_latency(LOGN, lg_of(d)));
        for (int p = 0; p < NNN3D; p++) begin
          act = fft_point(pass, t, p, cx, cy, cz, n);
          g_rd_en[p]   = act;
          g_rd_addr[p] = nbhd(cx, cy, cz);
          act = fft_point(pass, t - GRID_RD_LAT, p, cx, cy, cz, n);
          fft_in_valid[p] = act;
          fft_in_idx[p]   = n;
          act = fft_point(pass, t - wb_delay(pass), p, cx, cy, cz, n);
          g_wr_en[p]   = act;
          g_wr_addr[p] = nbhd(cx, cy, cz);
          act = fft_point(pass, t - fft_latency(LOGN, lg_of(d)), p, cx, cy, cz, n);
          gr_rd_en[p]   = act && (pass == 3'd2);
          gr_rd_addr[p] = nbhd(cx, cy, cz);
        end
      end
      default: ;
    endcase
  end

endmodule
