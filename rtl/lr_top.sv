// lr_top: single-FPGA long range (LR) electrostatics accelerator.
//
// Computes the long range part of the Coulomb force on every particle with a
// particle-mesh method: the particles' charges are spread onto a periodic 3D
// grid with third-order basis functions, the charge grid is transformed with
// a 3D FFT, multiplied by a Green's function, transformed back to a potential
// grid, and the potential is interpolated back onto each particle with the
// derivative of the basis functions to give its force in X, Y and Z.
//
// Blocks: particle_info_mem (particle cache), coeff_gen x4 (charge and X/Y/Z
// force coefficients), cluster_mem (64-bank clustered grid memory),
// charge_accum, fft_pipeline x64, greens_rom, green_conv, force_mac x3,
// force_fifo and lr_sequencer.  The block structure follows the design
// description; fixed point replaces its floating point throughout.
//
// Interfaces:
//   particle in : p_valid/p_ready/p_last with floor grid point (p_ix..p_iz),
//                 offsets (Q0.27) and charge (Q5.27).  Loading the particles
//                 starts an iteration; at least as many particles as grid
//                 points make the grid clearing free.
//   force out   : f_valid/f_ready/f_last with forces f_x, f_y, f_z
//                 (GRID_FRAC fraction bits, scaled as sum of potential times
//                 q times basis derivative with respect to the offset).
//   Green's load: g_ld_en with a grid point and its value, one per cycle,
//                 before the first iteration.
//   status      : phase (0 load, 1 clear, 2 charge map, 3 FFT, 4 force),
//                 fft_pass (0..5) and cm_stall (charge mapping hazard stall).
// One particle is mapped or interpolated per clock cycle when nothing stalls.
//
// Lint note: the valid outputs of the grid and Green's read clusters, of
// charge_accum and green_conv, and the FFT output index are left unconnected
// on purpose.  Every path they belong to has a fixed latency and the
// sequencer schedules the matching write-back by time, so these flags carry
// no information here; they remain for stand-alone use and testing of the
// blocks.  Lint reports them as unused signals.
module lr_top
  import lr_pkg::*;
#(
  parameter int NPART = 32768,   // Table 4.1, configuration 1
  parameter int LGX   = 5,       // 32 x 32 x 32 grid
  parameter int LGY   = 5,
  parameter int LGZ   = 5,
  parameter int FIFO_DEPTH = 32,
  localparam int LOGN = (LGX > LGY) ? ((LGX > LGZ) ? LGX : LGZ) : ((LGY > LGZ) ? LGY : LGZ),
  localparam int AW   = LGX + LGY + LGZ - 6
) (
  input  logic             clk,
  input  logic             rst_n,
  // particle info in
  input  logic             p_valid,
  output logic             p_ready,
  input  logic             p_last,
  input  logic [LGX-1:0]   p_ix,
  input  logic [LGY-1:0]   p_iy,
  input  logic [LGZ-1:0]   p_iz,
  input  logic [OFS_W-1:0] p_ox,
  input  logic [OFS_W-1:0] p_oy,
  input  logic [OFS_W-1:0] p_oz,
  input  word_t            p_q,
  // particle force out
  output logic             f_valid,
  input  logic             f_ready,
  output logic             f_last,
  output word_t            f_x,
  output word_t            f_y,
  output word_t            f_z,
  // Green's table load
  input  logic             g_ld_en,
  input  logic [LGX-1:0]   g_ld_x,
  input  logic [LGY-1:0]   g_ld_y,
  input  logic [LGZ-1:0]   g_ld_z,
  input  word_t            g_ld_data,
  // status
  output logic [2:0]       phase,
  output logic [2:0]       fft_pass,
  output logic             cm_stall
);
  localparam int PA = $clog2(NPART);
  localparam int CW = $clog2(NPART + 1);
  localparam int LW = $clog2(LOGN + 1);
  localparam int FC_LAT = GRID_RD_LAT + 7;   // issue -> force MAC result

  // ---------------- particle info memory ----------------
  logic              pm_start, pm_load_en, pm_load_done, pm_rd_en;
  logic [CW-1:0]     pm_count;
  logic [PA-1:0]     pm_rd_addr;
  logic [LGX-1:0]    pm_ix;
  logic [LGY-1:0]    pm_iy;
  logic [LGZ-1:0]    pm_iz;
  logic [OFS_W-1:0]  pm_ofs [3];
  word_t             pm_q;

  particle_info_mem #(.NPART(NPART), .LGX(LGX), .LGY(LGY), .LGZ(LGZ)) u_pmem (
    .clk, .rst_n, .start(pm_start), .load_en(pm_load_en),
    .s_valid(p_valid), .s_ready(p_ready), .s_last(p_last),
    .s_ix(p_ix), .s_iy(p_iy), .s_iz(p_iz), .s_ox(p_ox), .s_oy(p_oy), .s_oz(p_oz), .s_q(p_q),
    .count(pm_count), .load_done(pm_load_done),
    .rd_en(pm_rd_en), .rd_addr(pm_rd_addr),
    .rd_ix(pm_ix), .rd_iy(pm_iy), .rd_iz(pm_iz),
    .rd_ox(pm_ofs[0]), .rd_oy(pm_ofs[1]), .rd_oz(pm_ofs[2]), .rd_q(pm_q)
  );

  // ---------------- sequencer ----------------
  logic [NNN3D-1:0] g_rd_en, g_wr_en, gr_rd_en, fft_in_valid;
  logic [AW-1:0]    g_rd_addr [NNN3D], g_wr_addr [NNN3D], gr_rd_addr [NNN3D];
  logic [1:0]       g_rd_shift [3], g_wr_shift [3], gr_rd_shift [3];
  logic [1:0]       g_wr_sel;
  logic [LW-1:0]    fft_len;
  logic             fft_inv;
  logic [LOGN-1:0]  fft_in_idx [NNN3D];
  logic             cm_issue, fc_issue, fc_last;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;
  logic             mac_valid, out_last_done;

  lr_sequencer #(.NPART(NPART), .LGX(LGX), .LGY(LGY), .LGZ(LGZ), .FIFO_DEPTH(FIFO_DEPTH)) u_seq (
    .clk, .rst_n,
    .pm_start, .pm_load_en, .pm_take(p_valid && p_ready), .pm_count, .pm_load_done,
    .pm_rd_en, .pm_rd_addr, .pm_ix, .pm_iy, .pm_iz,
    .g_rd_en, .g_rd_addr, .g_rd_shift,
    .g_wr_en, .g_wr_addr, .g_wr_shift, .g_wr_sel,
    .gr_rd_en, .gr_rd_addr, .gr_rd_shift,
    .fft_len, .fft_inv, .fft_in_valid, .fft_in_idx,
    .cm_issue, .fc_issue, .fc_last,
    .fifo_count, .mac_valid, .out_last_done,
    .cm_stall, .phase_o(phase), .fft_pass_o(fft_pass)
  );

  // ---------------- clustered grid memory ----------------
  logic [NNN3D-1:0] g_rd_valid;
  logic [63:0]      g_rd_raw [NNN3D], g_wr_raw [NNN3D];
  cplx_t            g_rd [NNN3D];

  cluster_mem #(.WIDTH(64), .LGX(LGX), .LGY(LGY), .LGZ(LGZ)) u_grid (
    .clk, .rst_n,
    .rd_en(g_rd_en), .rd_addr(g_rd_addr), .rd_shift(g_rd_shift),
    .rd_valid(g_rd_valid), .rd_data(g_rd_raw),
    .wr_en(g_wr_en), .wr_addr(g_wr_addr), .wr_data(g_wr_raw), .wr_shift(g_wr_shift)
  );

  always_comb for (int p = 0; p < NNN3D; p++) g_rd[p] = cplx_t'(g_rd_raw[p]);

  // ---------------- charge mapping ----------------
  logic  cg_valid, cg_valid_d, acc_valid;
  word_t cg_w [NNN3D], cg_w_d [NNN3D];
  cplx_t acc_out [NNN3D];

  coeff_gen #(.DERIV_DIM(-1)) u_cg_charge (
    .clk, .rst_n, .in_valid(cm_issue), .in_ofs(pm_ofs), .in_q(pm_q),
    .out_valid(cg_valid), .out_w(cg_w)
  );

  // one register aligns the coefficients (6 cycles) with the grid read (7)
  always_ff @(posedge clk) cg_w_d <= cg_w;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cg_valid_d <= 1'b0;
    else        cg_valid_d <= cg_valid;

  charge_accum u_acc (
    .clk, .rst_n, .in_valid(cg_valid_d), .grid_in(g_rd), .contrib(cg_w_d),
    .out_valid(acc_valid), .grid_out(acc_out)
  );

  // ---------------- FFT pipelines and convolution ----------------
  cplx_t            fft_out [NNN3D], conv_out [NNN3D];
  logic [NNN3D-1:0] fft_out_valid;
  logic             conv_valid;
  word_t            green [NNN3D];
  logic [NNN3D-1:0] gr_rd_valid;

  for (genvar p = 0; p < NNN3D; p++) begin : g_fft
    logic [LOGN-1:0] oidx;
    fft_pipeline #(.LOGN(LOGN)) u_fft (
      .clk, .rst_n, .len(fft_len), .scale(!fft_inv),
      .in_valid(fft_in_valid[p]), .in_idx(fft_in_idx[p]),
      .in_data(fft_inv ? cswap(g_rd[p]) : g_rd[p]),
      .out_valid(fft_out_valid[p]), .out_idx(oidx), .out_data(fft_out[p])
    );
  end

  greens_rom #(.LGX(LGX), .LGY(LGY), .LGZ(LGZ)) u_green (
    .clk, .rst_n,
    .ld_en(g_ld_en), .ld_x(g_ld_x), .ld_y(g_ld_y), .ld_z(g_ld_z), .ld_data(g_ld_data),
    .rd_en(gr_rd_en), .rd_addr(gr_rd_addr), .rd_shift(gr_rd_shift),
    .rd_valid(gr_rd_valid), .rd_data(green)
  );

  green_conv u_conv (
    .clk, .rst_n, .in_valid(|fft_out_valid), .in_data(fft_out), .green(green),
    .out_valid(conv_valid), .out_data(conv_out)
  );

  // ---------------- grid write-back source ----------------
  always_comb
    for (int p = 0; p < NNN3D; p++)
      case (g_wr_sel)
        2'd0:    g_wr_raw[p] = '0;                                   // clearing
        2'd1:    g_wr_raw[p] = acc_out[p];                           // charge map
        2'd2:    g_wr_raw[p] = fft_inv ? cswap(fft_out[p]) : fft_out[p];
        default: g_wr_raw[p] = conv_out[p];                          // FFT x Green
      endcase

  // ---------------- force computation ----------------
  logic  fcg_valid [3], fcg_valid_d;
  word_t fcg_w [3][NNN3D], fcg_w_d [3][NNN3D];
  word_t pot [NNN3D];
  word_t fsum [3];
  logic  fmac_valid [3];
  logic [FC_LAT-1:0] last_dl;

  for (genvar d = 0; d < 3; d++) begin : g_force
    coeff_gen #(.DERIV_DIM(d)) u_cg_force (
      .clk, .rst_n, .in_valid(fc_issue), .in_ofs(pm_ofs), .in_q(pm_q),
      .out_valid(fcg_valid[d]), .out_w(fcg_w[d])
    );
    always_ff @(posedge clk) fcg_w_d[d] <= fcg_w[d];
    force_mac u_mac (
      .clk, .rst_n, .in_valid(fcg_valid_d), .pot(pot), .coef(fcg_w_d[d]),
      .out_valid(fmac_valid[d]), .force_out(fsum[d])
    );
  end

  always_comb for (int p = 0; p < NNN3D; p++) pot[p] = g_rd[p].re;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      fcg_valid_d <= 1'b0;
      last_dl     <= '0;
    end else begin
      fcg_valid_d <= fcg_valid[0];
      last_dl     <= {last_dl[FC_LAT-2:0], fc_last};
    end

  assign mac_valid = fmac_valid[0];

  logic [96:0] fifo_out;
  force_fifo #(.WIDTH(97), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(mac_valid), .in_data({last_dl[FC_LAT-1], fsum[0], fsum[1], fsum[2]}),
    .out_valid(f_valid), .out_ready(f_ready), .out_data(fifo_out), .count(fifo_count)
  );

  assign {f_last, f_x, f_y, f_z} = fifo_out;
  assign out_last_done = f_valid && f_ready && f_last;

endmodule
