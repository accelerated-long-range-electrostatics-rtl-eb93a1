// tb_particle_info_mem: self-checking test of the particle cache.
// Loads particles through the ready/valid/last interface with random valid
// gaps, checks s_ready, the particle count and the one-cycle load_done pulse
// after the last particle, then reads every entry back (one-cycle read
// latency, output held while rd_en is low).  A second load fills the cache to
// capacity without s_last: s_ready must drop when it is full.
module tb_particle_info_mem;
  import lr_pkg::*;

  localparam int NPART = 40;
  localparam int LG    = 4;

  logic clk = 0, rst_n = 0;
  logic start, load_en, s_valid, s_ready, s_last, load_done, rd_en;
  logic [LG-1:0] s_ix, s_iy, s_iz, rd_ix, rd_iy, rd_iz;
  logic [OFS_W-1:0] s_ox, s_oy, s_oz, rd_ox, rd_oy, rd_oz;
  word_t s_q, rd_q;
  logic [$clog2(NPART+1)-1:0] count;
  logic [$clog2(NPART)-1:0] rd_addr;

  int checks = 0, failures = 0;
  logic [LG*3+OFS_W*3+32-1:0] ref_mem [NPART];

  particle_info_mem #(.NPART(NPART), .LGX(LG), .LGY(LG), .LGZ(LG)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  // load n particles (s_last on the last one unless nolast)
  task automatic load(int n, bit nolast);
    int i, done_seen;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    load_en = 1;
    check(count == 0, "count not cleared by start");
    i = 0;
    done_seen = 0;
    while (i < n) begin
      s_valid = ($urandom % 3) != 0;
      s_last  = !nolast && (i == n - 1);
      {s_q, s_oz, s_oy, s_ox, s_iz, s_iy, s_ix} = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      check(s_ready == (i < NPART), "s_ready wrong");
      if (s_valid && s_ready) begin
        ref_mem[i] = {s_q, s_oz, s_oy, s_ox, s_iz, s_iy, s_ix};
        i++;
      end
      @(negedge clk);
      if (load_done) done_seen++;
      check(load_done == (s_valid && i == n && (!nolast || n == NPART)) || load_done == 0 && i < n,
            "load_done wrong");
      check(count == ($clog2(NPART+1))'(i), "count wrong");
    end
    s_valid = 0;
    s_last = 0;
    check(done_seen == 1, "load_done not pulsed exactly once");
    if (nolast) begin
      // the cache is full: s_ready must be low and further pushes ignored
      s_valid = 1;
      repeat (3) @(negedge clk);
      check(!s_ready, "s_ready high when full");
      check(count == ($clog2(NPART+1))'(NPART), "count moved past capacity");
      s_valid = 0;
    end
    load_en = 0;
    @(negedge clk);
    check(!s_ready, "s_ready high without load_en");
  endtask

  task automatic readback(int n);
    for (int i = 0; i < n; i++) begin
      rd_en = 1;
      rd_addr = ($clog2(NPART))'(i);
      @(negedge clk);
      rd_en = 0;
      rd_addr = ($clog2(NPART))'(($urandom % n));
      @(negedge clk);   // output must hold while rd_en is low
      check({rd_q, rd_oz, rd_oy, rd_ox, rd_iz, rd_iy, rd_ix} == ref_mem[i], "read data wrong");
    end
  endtask

  initial begin
    start = 0; load_en = 0; s_valid = 0; s_last = 0; rd_en = 0; rd_addr = 0;
    {s_q, s_oz, s_oy, s_ox, s_iz, s_iy, s_ix} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(25, 1'b0);
    readback(25);
    load(NPART, 1'b1);
    readback(NPART);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
