// tb_cluster_mem: self-checking test of the clustered grid memory.
// An 8x8x8 grid is kept in a plain array.  Every cycle the test issues a
// write of a random 4x4x4 box (random origin, so random toroidal shifts, and
// random per-port enables) and a read of another random box.  Each port's
// read data must come back on the same port exactly 7 cycles later, with
// rd_valid equal to the port's enable, and must show every write issued one
// or more cycles before the read.  A write followed by a read of the same
// box in the next cycle checks the write-to-read visibility directly.
module tb_cluster_mem;
  import lr_pkg::*;

  localparam int LG  = 3;
  localparam int G   = 1 << LG;
  localparam int AW  = 3 * LG - 6;
  localparam int LAT = 7;
  localparam int NC  = 600;

  logic clk = 0, rst_n = 0;
  logic [NNN3D-1:0] rd_en, rd_valid, wr_en;
  logic [AW-1:0]    rd_addr [NNN3D], wr_addr [NNN3D];
  logic [1:0]       rd_shift [3], wr_shift [3];
  logic [63:0]      rd_data [NNN3D], wr_data [NNN3D];

  int checks = 0, failures = 0;
  logic [63:0]      model [G*G*G];
  logic [63:0]      exp_d [LAT+1][NNN3D];
  logic [NNN3D-1:0] exp_v [LAT+1];

  cluster_mem #(.WIDTH(64), .LGX(LG), .LGY(LG), .LGZ(LG)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pt(int bx, int by, int bz, int p);
    return ((bx + p % 4) % G) + G * (((by + (p / 4) % 4) % G) + G * ((bz + p / 16) % G));
  endfunction

  // neighbourhood address of grid point index i
  function automatic logic [AW-1:0] nb(int i);
    int x, y, z;
    x = i % G; y = (i / G) % G; z = i / (G * G);
    return AW'(((z >> 2) << (2 * (LG - 2))) | ((y >> 2) << (LG - 2)) | (x >> 2));
  endfunction

  task automatic drive_box(bit wr, int bx, int by, int bz, logic [NNN3D-1:0] en);
    for (int p = 0; p < NNN3D; p++) begin
      if (wr) begin
        wr_addr[p] = nb(pt(bx, by, bz, p));
        wr_data[p] = {$urandom, $urandom};
      end else rd_addr[p] = nb(pt(bx, by, bz, p));
    end
    if (wr) begin
      wr_en = en;
      wr_shift = '{2'(bx), 2'(by), 2'(bz)};
    end else begin
      rd_en = en;
      rd_shift = '{2'(bx), 2'(by), 2'(bz)};
    end
  endtask

  initial begin
    int rb [3], wb [3];
    rd_en = '0; wr_en = '0;
    rd_shift = '{default: '0}; wr_shift = '{default: '0};
    foreach (rd_addr[p]) begin rd_addr[p] = '0; wr_addr[p] = '0; wr_data[p] = '0; end
    foreach (exp_v[i]) exp_v[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // initialise the whole grid through aligned box writes
    for (int z = 0; z < G; z += 4)
      for (int y = 0; y < G; y += 4)
        for (int x = 0; x < G; x += 4) begin
          drive_box(1, x, y, z, '1);
          for (int p = 0; p < NNN3D; p++) model[pt(x, y, z, p)] = wr_data[p];
          @(negedge clk);
        end
    for (int c = 0; c < NC; c++) begin
      // check the read issued LAT cycles ago
      if (c >= LAT) begin
        for (int p = 0; p < NNN3D; p++) begin
          checks++;
          if (rd_valid[p] !== exp_v[c % (LAT+1)][p] ||
              (exp_v[c % (LAT+1)][p] && rd_data[p] !== exp_d[c % (LAT+1)][p])) begin
            failures++;
            if (failures < 10)
              $display("cycle %0d port %0d: valid %0b data %h, expected %0b %h", c, p,
                       rd_valid[p], rd_data[p], exp_v[c % (LAT+1)][p], exp_d[c % (LAT+1)][p]);
          end
        end
      end
      // read box: every 4th cycle re-read the box written in the previous cycle
      if (c % 4 == 1) rb = wb;
      else foreach (rb[d]) rb[d] = $urandom % G;
      foreach (wb[d]) wb[d] = $urandom % G;
      if (c < NC - LAT - 1) begin
        drive_box(0, rb[0], rb[1], rb[2], (c % 4 == 1) ? '1 : {$urandom, $urandom});
        drive_box(1, wb[0], wb[1], wb[2], {$urandom, $urandom});
      end else begin
        rd_en = '0;
        wr_en = '0;
      end
      // expected read result: memory before this cycle's write
      for (int p = 0; p < NNN3D; p++) exp_d[(c + LAT) % (LAT+1)][p] = model[pt(rb[0], rb[1], rb[2], p)];
      exp_v[(c + LAT) % (LAT+1)] = rd_en;
      for (int p = 0; p < NNN3D; p++)
        if (wr_en[p]) model[pt(wb[0], wb[1], wb[2], p)] = wr_data[p];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
