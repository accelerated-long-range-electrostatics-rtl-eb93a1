// greens_rom: Green's function table, organised like the clustered grid memory.
//
// Holds one 32-bit value per grid point (GREEN_FRAC fraction bits) in 64
// interleaved neighbour memories with the same three-stage toroidal-shift
// access network as the grid memory, so that it can be read through a 64-port
// cluster in step with the grid during the last forward FFT pass (along Z).
// The design description computes the values offline and programs them as a
// ROM with the FPGA image; the table (32K words at the default size) is too
// large to ship as an initialisation file here, so this design fills it once
// through a single-point load port (ld_*), one grid point per cycle, before
// the first LR iteration.  Read timing is that of cluster_mem (7 cycles).
module greens_rom
  import lr_pkg::*;
#(
  parameter int LGX = 5,
  parameter int LGY = 5,
  parameter int LGZ = 5,
  localparam int AW = LGX + LGY + LGZ - 6
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration load, one grid point per cycle
  input  logic             ld_en,
  input  logic [LGX-1:0]   ld_x,
  input  logic [LGY-1:0]   ld_y,
  input  logic [LGZ-1:0]   ld_z,
  input  word_t            ld_data,
  // read cluster
  input  logic [NNN3D-1:0] rd_en,
  input  logic [AW-1:0]    rd_addr  [NNN3D],
  input  logic [1:0]       rd_shift [3],
  output logic [NNN3D-1:0] rd_valid,
  output word_t            rd_data  [NNN3D]
);
  logic [NNN3D-1:0] wr_en;
  logic [AW-1:0]    wr_addr  [NNN3D];
  logic [31:0]      wr_data  [NNN3D];
  logic [1:0]       wr_shift [3];
  logic [31:0]      rd_raw   [NNN3D];
  logic [5:0]       nbr;

  // The loaded point goes through the port equal to its neighbour ID, shift 0.
  assign nbr = {ld_z[1:0], ld_y[1:0], ld_x[1:0]};
  always_comb begin
    for (int p = 0; p < NNN3D; p++) begin
      wr_en[p]   = ld_en && (nbr == 6'(p));
      wr_addr[p] = {ld_z[LGZ-1:2], ld_y[LGY-1:2], ld_x[LGX-1:2]};
      wr_data[p] = ld_data;
      rd_data[p] = word_t'(rd_raw[p]);
    end
    wr_shift = '{default: 2'd0};
  end

  cluster_mem #(.WIDTH(32), .LGX(LGX), .LGY(LGY), .LGZ(LGZ)) u_mem (
    .clk, .rst_n,
    .rd_en, .rd_addr, .rd_shift, .rd_valid, .rd_data(rd_raw),
    .wr_en, .wr_addr, .wr_data, .wr_shift
  );
endmodule
