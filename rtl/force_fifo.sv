// force_fifo: synchronous FIFO holding finished particle forces until the
// host takes them over the ready-valid-last output interface.
// The design description stalls the whole force pipeline when the host is
// not ready; this design instead lets the sequencer issue a particle only
// when the FIFO is sure to have room for its result (credit count), which has
// the same effect at the interface.  Push and pop in the same cycle are
// allowed; out_valid is high whenever the FIFO is not empty (show-ahead).
module force_fifo #(
  parameter int WIDTH = 97,
  parameter int DEPTH = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [WIDTH-1:0]           in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [WIDTH-1:0]           out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wp, rp;
  logic             pop;

  assign out_valid = (count != 0);
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rp];

  always_ff @(posedge clk) if (push) mem[wp] <= in_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
      count <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      count <= count + (push ? CW'(1) : CW'(0)) - (pop ? CW'(1) : CW'(0));
      // the credit count in the sequencer never pushes into a full buffer
      assert (!(push && !pop && count == CW'(DEPTH)));
    end

  // the credit scheme upstream must never overfill the FIFO
endmodule
