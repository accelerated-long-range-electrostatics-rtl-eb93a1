// cluster_mem: clustered (3D low-order interleaved) grid memory.
//
// The grid is split into 4x4x4 neighbourhoods.  A grid point (x, y, z) lives
// in memory unit ("neighbour") n = x[1:0] + 4*y[1:0] + 16*z[1:0], at address
// {z_hi, y_hi, x_hi} (the neighbourhood ID).  The numbering of neighbours
// follows the memory access figure of the design description.  Any 4x4x4 box
// of grid points, aligned or not, and any set of points that uses each
// neighbour once, can be read and written in one cycle through a 64-port
// access cluster.
//
// Port p = px + 4*py + 16*pz of the cluster reaches neighbour
// ((px+sx)%4) + 4*((py+sy)%4) + 16*((pz+sz)%4), where (sx, sy, sz) is the
// shift given with the access.  The routing is a three-stage toroidal-shift
// network, one pipelined stage per dimension (X, then Y, then Z), as in the
// design description; read data goes back through the reverse shifts so each
// port gets the data it asked for.  The description routes each port by
// comparing its neighbour ID with the port ID; using one shift per dimension
// for the whole cluster is this design's simplification, and covers every
// access pattern the sequencer makes.
//
// Timing: a read request at cycle t returns data (rd_valid per port) at t+7
// (3 align, 1 bank read, 3 realign).  A write request at cycle t is stored at
// the clock edge ending cycle t+3 and is seen by reads issued from t+1 on.
// There is one read cluster and one write cluster (two-port banks).
module cluster_mem
  import lr_pkg::*;
#(
  parameter int WIDTH = 64,  // bits per grid point (64: complex grid, 32: Green's table)
  parameter int LGX   = 5,   // log2 of the grid size in X (power of two, >= 2)
  parameter int LGY   = 5,
  parameter int LGZ   = 5,
  localparam int AW   = LGX + LGY + LGZ - 6,  // neighbourhood address width
  localparam int DEPTH = 1 << AW
) (
  input  logic             clk,
  input  logic             rst_n,
  // read cluster
  input  logic [NNN3D-1:0] rd_en,
  input  logic [AW-1:0]    rd_addr  [NNN3D],
  input  logic [1:0]       rd_shift [3],
  output logic [NNN3D-1:0] rd_valid,
  output logic [WIDTH-1:0] rd_data  [NNN3D],
  // write cluster
  input  logic [NNN3D-1:0] wr_en,
  input  logic [AW-1:0]    wr_addr  [NNN3D],
  input  logic [WIDTH-1:0] wr_data  [NNN3D],
  input  logic [1:0]       wr_shift [3]
);

  // Port index of the entry that lands on position q when lines along
  // dimension d are rotated by s (forward direction: port -> neighbour).
  function automatic int src_fwd(int q, int d, logic [1:0] s);
    int c;
    c = (q >> (2 * d)) & 3;
    return (q & ~(3 << (2 * d))) | ((((c - int'(s)) % 4 + 4) % 4) << (2 * d));
  endfunction

  // Reverse direction (neighbour -> port).
  function automatic int src_rev(int p, int d, logic [1:0] s);
    int c;
    c = (p >> (2 * d)) & 3;
    return (p & ~(3 << (2 * d))) | (((c + int'(s)) % 4) << (2 * d));
  endfunction

  // ---------------- read path ----------------
  logic [NNN3D-1:0] rq_en [3];          // after X, Y, Z alignment
  logic [AW-1:0]    rq_addr [3][NNN3D];
  logic [1:0]       rsh  [3][3];        // shifts travelling with the request
  logic [NNN3D-1:0] bank_en;
  logic [WIDTH-1:0] bank_data [NNN3D];
  logic [1:0]       bsh  [3];
  logic [NNN3D-1:0] rb_en [3];          // after Z, Y, X realignment
  logic [WIDTH-1:0] rb_data [3][NNN3D];
  logic [1:0]       rbsh [2][3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 3; s++) begin
        rq_en[s] <= '0;
        rb_en[s] <= '0;
      end
    end else begin
      for (int q = 0; q < NNN3D; q++) begin
        rq_en[0][q] <= rd_en[src_fwd(q, 0, rd_shift[0])];
        rq_en[1][q] <= rq_en[0][src_fwd(q, 1, rsh[0][1])];
        rq_en[2][q] <= rq_en[1][src_fwd(q, 2, rsh[1][2])];
        rb_en[0][q] <= bank_en[src_rev(q, 2, bsh[2])];
        rb_en[1][q] <= rb_en[0][src_rev(q, 1, rbsh[0][1])];
        rb_en[2][q] <= rb_en[1][src_rev(q, 0, rbsh[1][0])];
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int q = 0; q < NNN3D; q++) begin
      rq_addr[0][q] <= rd_addr[src_fwd(q, 0, rd_shift[0])];
      rq_addr[1][q] <= rq_addr[0][src_fwd(q, 1, rsh[0][1])];
      rq_addr[2][q] <= rq_addr[1][src_fwd(q, 2, rsh[1][2])];
      rb_data[0][q] <= bank_data[src_rev(q, 2, bsh[2])];
      rb_data[1][q] <= rb_data[0][src_rev(q, 1, rbsh[0][1])];
      rb_data[2][q] <= rb_data[1][src_rev(q, 0, rbsh[1][0])];
    end
    rsh[0]  <= rd_shift;
    rsh[1]  <= rsh[0];
    rsh[2]  <= rsh[1];
    bsh     <= rsh[2];
    rbsh[0] <= bsh;
    rbsh[1] <= rbsh[0];
  end

  // ---------------- write path ----------------
  logic [NNN3D-1:0] wq_en [3];
  logic [AW-1:0]    wq_addr [3][NNN3D];
  logic [WIDTH-1:0] wq_data [3][NNN3D];
  logic [1:0]       wsh [2][3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 3; s++) wq_en[s] <= '0;
    end else begin
      for (int q = 0; q < NNN3D; q++) begin
        wq_en[0][q] <= wr_en[src_fwd(q, 0, wr_shift[0])];
        wq_en[1][q] <= wq_en[0][src_fwd(q, 1, wsh[0][1])];
        wq_en[2][q] <= wq_en[1][src_fwd(q, 2, wsh[1][2])];
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int q = 0; q < NNN3D; q++) begin
      wq_addr[0][q] <= wr_addr[src_fwd(q, 0, wr_shift[0])];
      wq_data[0][q] <= wr_data[src_fwd(q, 0, wr_shift[0])];
      wq_addr[1][q] <= wq_addr[0][src_fwd(q, 1, wsh[0][1])];
      wq_data[1][q] <= wq_data[0][src_fwd(q, 1, wsh[0][1])];
      wq_addr[2][q] <= wq_addr[1][src_fwd(q, 2, wsh[1][2])];
      wq_data[2][q] <= wq_data[1][src_fwd(q, 2, wsh[1][2])];
    end
    wsh[0] <= wr_shift;
    wsh[1] <= wsh[0];
  end

  // ---------------- the 64 neighbour memories ----------------
  for (genvar n = 0; n < NNN3D; n++) begin : g_bank
    logic [WIDTH-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (wq_en[2][n]) mem[wq_addr[2][n]] <= wq_data[2][n];
      bank_data[n] <= mem[rq_addr[2][n]];
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) bank_en <= '0;
    else        bank_en <= rq_en[2];

  always_comb
    for (int p = 0; p < NNN3D; p++) begin
      rd_valid[p] = rb_en[2][p];
      rd_data[p]  = rb_data[2][p];
    end

endmodule
