// particle_info_mem: particle position and charge cache.
//
// The host streams one particle per beat over a ready-valid interface with a
// 'last' flag.  A particle is its floor grid point (ix, iy, iz, unsigned, one
// address width per dimension), its offsets from that point (ox, oy, oz,
// unsigned Q0.27) and its charge q (signed Q5.27).  These fields and formats
// follow the design description; the storage is one array word per particle.
// The memory is read twice per LR iteration, once for charge mapping and once
// for force computation, through a synchronous read port (data one cycle after
// rd_en).
//
// Interface / timing:
//   load_en    : the sequencer allows loading (load phase).
//   s_ready    : load_en and room left.  A beat is taken when s_valid && s_ready.
//   count      : number of particles stored since the last 'start' pulse.
//   load_done  : one-cycle pulse after the beat carrying s_last was taken
//                (or when the memory becomes full).
//   start      : clears the count; a new iteration begins.
module particle_info_mem #(
  parameter int NPART = 32768,  // particles held (Table 4.1, configuration 1)
  parameter int LGX   = 5,      // log2 of grid points in X
  parameter int LGY   = 5,
  parameter int LGZ   = 5
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      load_en,
  // host side
  input  logic                      s_valid,
  output logic                      s_ready,
  input  logic                      s_last,
  input  logic [LGX-1:0]            s_ix,
  input  logic [LGY-1:0]            s_iy,
  input  logic [LGZ-1:0]            s_iz,
  input  logic [lr_pkg::OFS_W-1:0]  s_ox,
  input  logic [lr_pkg::OFS_W-1:0]  s_oy,
  input  logic [lr_pkg::OFS_W-1:0]  s_oz,
  input  lr_pkg::word_t             s_q,
  output logic [$clog2(NPART+1)-1:0] count,
  output logic                      load_done,
  // read side
  input  logic                      rd_en,
  input  logic [$clog2(NPART)-1:0]  rd_addr,
  output logic [LGX-1:0]            rd_ix,
  output logic [LGY-1:0]            rd_iy,
  output logic [LGZ-1:0]            rd_iz,
  output logic [lr_pkg::OFS_W-1:0]  rd_ox,
  output logic [lr_pkg::OFS_W-1:0]  rd_oy,
  output logic [lr_pkg::OFS_W-1:0]  rd_oz,
  output lr_pkg::word_t             rd_q
);
  import lr_pkg::*;

  localparam int PW = LGX + LGY + LGZ + 3 * OFS_W + Q_W;
  localparam int CW = $clog2(NPART + 1);

  logic [PW-1:0] mem [NPART];
  logic [PW-1:0] rd_word;
  logic          take;

  assign s_ready = load_en && (count < CW'(NPART));
  assign take    = s_valid && s_ready;

  always_ff @(posedge clk) begin
    if (take) mem[count[$clog2(NPART)-1:0]] <= {s_q, s_oz, s_oy, s_ox, s_iz, s_iy, s_ix};
    if (rd_en) rd_word <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      load_done <= 1'b0;
    end else begin
      load_done <= take && (s_last || count == CW'(NPART - 1));
      if (start) count <= '0;
      else if (take) count <= count + 1'b1;
    end
  end

  assign {rd_q, rd_oz, rd_oy, rd_ox, rd_iz, rd_iy, rd_ix} = rd_word;

endmodule
