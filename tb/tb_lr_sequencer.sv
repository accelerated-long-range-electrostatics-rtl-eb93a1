// tb_lr_sequencer: self-checking test of the LR control sequencer alone.
// The particle cache, force MAC and force buffer around it are replaced by
// small models.  Every grid-memory request is decoded back to grid points
// (port, neighbourhood address and toroidal shift) and checked:
//   LOAD/CLEAR  every grid point is cleared exactly once, one per accepted
//               particle during loading;
//   CMAP        each issued particle reads, and 8 cycles later writes back,
//               exactly its 4x4x4 box at floor-1; no box is read while an
//               overlapping earlier box has not been written (the hazard
//               stall), and stalls do happen;
//   FFT         in each of the six passes every point is read once and
//               written once, the write follows the read by the fixed
//               pipeline delay, each FFT input index is the point's
//               coordinate along the pass dimension, the Green's table reads
//               in the Z pass line up with the write-back, and each pass takes
//               the expected number of cycles;
//   FORCE       every particle is issued once with its box read, fc_last
//               marks the last one, and the credit count never lets the
//               force buffer overflow, also with a slow host.
// Two iterations run: 100 particles (with a CLEAR phase) and 600.
module tb_lr_sequencer;
  import lr_pkg::*;

  localparam int LG = 3, G = 1 << LG, NG = G * G * G, NPART = 600;
  localparam int FIFO_DEPTH = 16;  // more than the 14-cycle MAC latency: full rate
  localparam int AW = 3 * LG - 6, PA = $clog2(NPART), CW = $clog2(NPART + 1);
  localparam int LOGN = LG, LW = $clog2(LOGN + 1);
  localparam int FC_LAT = GRID_RD_LAT + 7;
  localparam int CM_WB = GRID_RD_LAT + 1;

  logic clk = 0, rst_n = 0;
  logic pm_start, pm_load_en, pm_take, pm_load_done, pm_rd_en;
  logic [CW-1:0] pm_count;
  logic [PA-1:0] pm_rd_addr;
  logic [LG-1:0] pm_ix, pm_iy, pm_iz;
  logic [NNN3D-1:0] g_rd_en, g_wr_en, gr_rd_en, fft_in_valid;
  logic [AW-1:0] g_rd_addr [NNN3D], g_wr_addr [NNN3D], gr_rd_addr [NNN3D];
  logic [1:0] g_rd_shift [3], g_wr_shift [3], gr_rd_shift [3], g_wr_sel;
  logic [LW-1:0] fft_len;
  logic fft_inv;
  logic [LOGN-1:0] fft_in_idx [NNN3D];
  logic cm_issue, fc_issue, fc_last;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;
  logic mac_valid, out_last_done;
  logic cm_stall;
  logic [2:0] phase_o, fft_pass_o;

  lr_sequencer #(.NPART(NPART), .LGX(LG), .LGY(LG), .LGZ(LG), .FIFO_DEPTH(FIFO_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("cycle %0d: FAIL %s", cyc, msg);
    end
  endtask

  // grid point reached by port p with neighbourhood address a and shift s
  function automatic int dec(int p, logic [AW-1:0] a, logic [1:0] s [3]);
    int c [3];
    for (int d = 0; d < 3; d++)
      c[d] = (((int'(a) >> ((LG - 2) * d)) & ((1 << (LG - 2)) - 1)) << 2)
             | ((((p >> (2 * d)) & 3) + int'(s[d])) & 3);
    return c[0] + G * (c[1] + G * c[2]);
  endfunction

  function automatic int coord(int pt, int d);
    return (pt >> (LG * d)) & (G - 1);
  endfunction

  // ---------------- particle cache model ----------------
  int px [NPART], py [NPART], pz [NPART];
  logic h_valid, h_last;
  int   n_in;
  assign pm_take = h_valid && pm_load_en && (int'(pm_count) < NPART);
  always_ff @(posedge clk) begin
    if (pm_start) pm_count <= '0;
    else if (pm_take) pm_count <= pm_count + 1'b1;
    pm_load_done <= pm_take && h_last;
    if (pm_rd_en) begin
      pm_ix <= LG'(px[pm_rd_addr]);
      pm_iy <= LG'(py[pm_rd_addr]);
      pm_iz <= LG'(pz[pm_rd_addr]);
    end
  end

  // ---------------- MAC and force buffer model ----------------
  logic [FC_LAT-1:0] mac_dl, last_dl;
  int   fifo_n, np_iter, n_forces;
  logic host_fast, last_in_fifo;
  logic pop;
  assign mac_valid  = mac_dl[FC_LAT-1];
  assign fifo_count = ($clog2(FIFO_DEPTH+1))'(fifo_n);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      mac_dl <= '0; last_dl <= '0; fifo_n <= 0; out_last_done <= 0; n_forces <= 0;
    end else begin
      mac_dl  <= {mac_dl[FC_LAT-2:0], fc_issue};
      last_dl <= {last_dl[FC_LAT-2:0], fc_last};
      fifo_n  <= fifo_n + (mac_valid ? 1 : 0) - (pop ? 1 : 0);
      out_last_done <= pop && (fifo_n == 1) && (n_forces + 1 == np_iter);
      if (pop) n_forces <= (n_forces + 1 == np_iter) ? 0 : n_forces + 1;
    end
  assign pop = (fifo_n > 0) && (host_fast || ($urandom % 4 == 0));

  // ---------------- request checks ----------------
  int clr_cnt [NG], rd_cnt [NG], wr_cnt [NG], gr_cnt [NG], rd_t [NG], last_issue [NG];
  int rd_hist [16][NNN3D];             // points read per port, by cycle
  int gr_hist [16][NNN3D];
  int n_clr, iss_cm, iss_fc, n_stall, n_bp, ph_cyc, pass_cyc [6];
  int cm_queue [$];
  logic [2:0] last_phase, last_pass;

  always @(negedge clk) begin
    int pt, k, wbd;
    cyc++;
    if (rst_n) begin
      check(fifo_n <= FIFO_DEPTH, "force buffer overflow");
      if (cm_stall) n_stall++;
      if (fifo_n > 0 && !pop) n_bp++;
      for (int p = 0; p < NNN3D; p++) begin
        rd_hist[cyc % 16][p] = -1;
        gr_hist[cyc % 16][p] = -1;
      end
      case (phase_o)
        3'd0, 3'd1: begin
          for (int p = 0; p < NNN3D; p++)
            if (g_wr_en[p]) begin
              check(g_wr_sel == 2'd0, "clear with wrong write source");
              pt = dec(p, g_wr_addr[p], g_wr_shift);
              clr_cnt[pt]++;
            end
          if (phase_o == 3'd0)
            check($countones(g_wr_en) == ((pm_take && n_clr < NG) ? 1 : 0),
                  $sformatf("clear not one per accepted particle (%0d %0b %0d)", $countones(g_wr_en), pm_take, n_clr));
          n_clr += $countones(g_wr_en);
        end
        3'd2: begin
          if (cm_issue) begin
            k = iss_cm++;
            for (int p = 0; p < NNN3D; p++) begin
              check(g_rd_en[p], "charge map read port disabled");
              pt = dec(p, g_rd_addr[p], g_rd_shift);
              check(pt == ((px[k] - 1 + (p & 3)) & (G - 1)) + G * (((py[k] - 1 + ((p >> 2) & 3)) & (G - 1))
                         + G * ((pz[k] - 1 + (p >> 4)) & (G - 1))), "charge map read box wrong");
              check(cyc - last_issue[pt] > CM_WB, "read before an overlapping write-back");
              last_issue[pt] = cyc;
            end
            cm_queue.push_back(cyc);
            cm_queue.push_back(k);
          end else check(g_rd_en == 0, "read without issue");
          if (g_wr_en != 0) begin
            int t0;
            t0 = cm_queue.pop_front();
            k  = cm_queue.pop_front();
            check(cyc - t0 == CM_WB && g_wr_en == '1 && g_wr_sel == 2'd1, "charge write-back timing");
            for (int p = 0; p < NNN3D; p++) begin
              pt = dec(p, g_wr_addr[p], g_wr_shift);
              check(pt == ((px[k] - 1 + (p & 3)) & (G - 1)) + G * (((py[k] - 1 + ((p >> 2) & 3)) & (G - 1))
                         + G * ((pz[k] - 1 + (p >> 4)) & (G - 1))), "charge map write box wrong");
            end
          end
        end
        3'd3: begin
          int d;
          d = (fft_pass_o == 0 || fft_pass_o == 5) ? 0 : (fft_pass_o == 1 || fft_pass_o == 4) ? 1 : 2;
          wbd = GRID_RD_LAT + fft_latency(LOGN, LG) + (fft_pass_o == 2 ? 1 : 0);
          pass_cyc[fft_pass_o]++;
          check(fft_inv == (fft_pass_o >= 3) && int'(fft_len) == LG, "FFT mode wrong");
          for (int p = 0; p < NNN3D; p++) begin
            if (g_rd_en[p]) begin
              pt = dec(p, g_rd_addr[p], g_rd_shift);
              rd_cnt[pt]++;
              rd_t[pt] = cyc;
              rd_hist[cyc % 16][p] = pt;
            end
            if (fft_in_valid[p]) begin
              pt = rd_hist[(cyc - GRID_RD_LAT) % 16][p];
              check(pt >= 0 && int'(fft_in_idx[p]) == coord(pt, d), "FFT input index wrong");
            end
            if (gr_rd_en[p]) begin
              pt = dec(p, gr_rd_addr[p], gr_rd_shift);
              gr_cnt[pt]++;
              gr_hist[cyc % 16][p] = pt;
            end
            if (g_wr_en[p]) begin
              pt = dec(p, g_wr_addr[p], g_wr_shift);
              wr_cnt[pt]++;
              check(cyc - rd_t[pt] == wbd, "FFT write-back delay wrong");
              check(g_wr_sel == (fft_pass_o == 2 ? 2'd3 : 2'd2), "FFT write source wrong");
              if (fft_pass_o == 2)
                check(gr_hist[(cyc - CM_WB) % 16][p] == pt, "Green's read not aligned with write");
            end
          end
        end
        3'd4: begin
          if (fc_issue) begin
            k = iss_fc++;
            check(fc_last == (k == np_iter - 1), "fc_last wrong");
            for (int p = 0; p < NNN3D; p++) begin
              pt = dec(p, g_rd_addr[p], g_rd_shift);
              check(g_rd_en[p] && pt == ((px[k] - 1 + (p & 3)) & (G - 1))
                    + G * (((py[k] - 1 + ((p >> 2) & 3)) & (G - 1)) + G * ((pz[k] - 1 + (p >> 4)) & (G - 1))),
                    "force read box wrong");
            end
          end
          check(g_wr_en == 0, "write during force phase");
        end
        default: check(0, "bad phase");
      endcase
      if (phase_o != last_phase) begin
        // leaving a phase: per-phase checks
        if (phase_o == 3'd2) begin
          for (int i = 0; i < NG; i++) check(clr_cnt[i] == 1, $sformatf("grid point %0d cleared %0d times", i, clr_cnt[i]));
        end
        if (last_phase == 3'd2) check(iss_cm == np_iter, "not every particle mapped");
        if (last_phase == 3'd3) begin
          for (int i = 0; i < NG; i++)
            check(rd_cnt[i] == 6 && wr_cnt[i] == 6 && gr_cnt[i] == 1, "FFT pass coverage wrong");
          for (int ps = 0; ps < 6; ps++)
            check(pass_cyc[ps] == NG / NNN3D + 3 + GRID_RD_LAT + fft_latency(LOGN, LG)
                  + (ps == 2 ? 1 : 0) + GRID_WR_LAT + 2, "FFT pass cycle count wrong");
        end
        if (last_phase == 3'd4) begin
          check(iss_fc == np_iter, $sformatf("%0d of %0d particles got a force", iss_fc, np_iter));
          if (host_fast) check(ph_cyc <= np_iter + FC_LAT + 10, "force phase too slow");
        end
        ph_cyc = 0;
      end else ph_cyc++;
      last_phase = phase_o;
    end
  end

  task automatic iteration(int np, bit fast);
    #2;   // after this cycle's checks
    np_iter = np;
    host_fast = fast;
    iss_cm = 0;
    iss_fc = 0;
    n_clr = 0;
    foreach (clr_cnt[i]) begin
      clr_cnt[i] = 0; rd_cnt[i] = 0; wr_cnt[i] = 0; gr_cnt[i] = 0; last_issue[i] = -100;
    end
    foreach (pass_cyc[i]) pass_cyc[i] = 0;
    // particles: runs that share a cell (hazards) and scattered ones
    for (int i = 0; i < np; i++) begin
      if (i % 8 < 3 && i > 0) begin
        px[i] = px[i-1]; py[i] = py[i-1]; pz[i] = pz[i-1];
      end else begin
        px[i] = $urandom % G; py[i] = $urandom % G; pz[i] = $urandom % G;
      end
    end
    n_in = 0;
    wait (phase_o == 3'd0);
    while (n_in < np) begin
      @(posedge clk);
      #1;
      h_valid = ($urandom % 4) != 0;
      h_last  = (n_in == np - 1);
      @(negedge clk);
      if (pm_take) n_in++;
    end
    @(posedge clk);
    #1;
    h_valid = 0;
    h_last = 0;
    wait (phase_o == 3'd4);
    wait (phase_o == 3'd0);
    @(negedge clk);
  endtask

  initial begin
    h_valid = 0; h_last = 0; host_fast = 1; np_iter = 1;
    pm_count = '0; pm_ix = '0; pm_iy = '0; pm_iz = '0; pm_load_done = 0;
    last_phase = 3'd0;
    n_stall = 0; n_bp = 0; ph_cyc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    iteration(100, 1'b0);
    iteration(NPART, 1'b1);
    #2;
    check(n_stall > 0, "no charge mapping stall happened");
    check(n_bp > 0, "no force back-pressure happened");
    $display("stall cycles %0d, back-pressure cycles %0d", n_stall, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
