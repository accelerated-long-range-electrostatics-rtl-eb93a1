// tb_greens_rom: self-checking test of the Green's function table.
// Loads a random value for every point of an 8x8x16 grid through the load
// port, one point per cycle in a random order, then reads random 4x4x4 boxes
// (all shifts) and checks each port's value and rd_valid exactly 7 cycles
// after the request.
module tb_greens_rom;
  import lr_pkg::*;

  localparam int LGX = 3, LGY = 3, LGZ = 4;
  localparam int GX = 1 << LGX, GY = 1 << LGY, GZ = 1 << LGZ;
  localparam int NG  = GX * GY * GZ;
  localparam int AW  = LGX + LGY + LGZ - 6;
  localparam int LAT = 7;

  logic clk = 0, rst_n = 0;
  logic ld_en;
  logic [LGX-1:0] ld_x;
  logic [LGY-1:0] ld_y;
  logic [LGZ-1:0] ld_z;
  word_t ld_data;
  logic [NNN3D-1:0] rd_en, rd_valid;
  logic [AW-1:0] rd_addr [NNN3D];
  logic [1:0] rd_shift [3];
  word_t rd_data [NNN3D];

  int checks = 0, failures = 0;
  word_t model [NG];
  int    perm  [NG];
  word_t exp_d [LAT+1][NNN3D];
  logic [NNN3D-1:0] exp_v [LAT+1];

  greens_rom #(.LGX(LGX), .LGY(LGY), .LGZ(LGZ)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bx, by, bz, c;
    ld_en = 0; ld_x = 0; ld_y = 0; ld_z = 0; ld_data = 0;
    rd_en = '0; rd_shift = '{default: '0};
    foreach (rd_addr[p]) rd_addr[p] = '0;
    foreach (exp_v[i]) exp_v[i] = '0;
    foreach (perm[i]) perm[i] = i;
    for (int i = NG - 1; i > 0; i--) begin
      int j, t;
      j = $urandom % (i + 1);
      t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NG; i++) begin
      int x, y, z;
      x = perm[i] % GX; y = (perm[i] / GX) % GY; z = perm[i] / (GX * GY);
      ld_en = 1;
      ld_x = LGX'(x); ld_y = LGY'(y); ld_z = LGZ'(z);
      ld_data = word_t'($urandom);
      model[perm[i]] = ld_data;
      @(negedge clk);
    end
    ld_en = 0;
    for (c = 0; c < 300; c++) begin
      if (c >= LAT)
        for (int p = 0; p < NNN3D; p++) begin
          checks++;
          if (rd_valid[p] !== exp_v[c % (LAT+1)][p] ||
              (rd_valid[p] && rd_data[p] !== exp_d[c % (LAT+1)][p])) begin
            failures++;
            if (failures < 10)
              $display("cycle %0d port %0d: got %0b %h expected %0b %h", c, p, rd_valid[p],
                       rd_data[p], exp_v[c % (LAT+1)][p], exp_d[c % (LAT+1)][p]);
          end
        end
      bx = $urandom % GX; by = $urandom % GY; bz = $urandom % GZ;
      rd_en = (c < 290) ? {$urandom, $urandom} : '0;
      rd_shift = '{2'(bx), 2'(by), 2'(bz)};
      for (int p = 0; p < NNN3D; p++) begin
        int x, y, z;
        x = (bx + p % 4) % GX; y = (by + (p / 4) % 4) % GY; z = (bz + p / 16) % GZ;
        rd_addr[p] = AW'(((z >> 2) << (LGX + LGY - 4)) | ((y >> 2) << (LGX - 2)) | (x >> 2));
        exp_d[(c + LAT) % (LAT+1)][p] = model[x + GX * (y + GY * z)];
      end
      exp_v[(c + LAT) % (LAT+1)] = rd_en;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
