// tb_force_fifo: self-checking test of the force output buffer.
// Pushes random words while the reader is randomly ready (never pushing into
// a full buffer, as the credit count guarantees), and checks the show-ahead
// output order against a queue, the count output, and that data pushed into
// an empty buffer is visible in the next cycle.
module tb_force_fifo;
  localparam int WIDTH = 97, DEPTH = 32;

  logic clk = 0, rst_n = 0;
  logic push, out_valid, out_ready;
  logic [WIDTH-1:0] in_data, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] q [$];

  force_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int max_n;
    push = 0; out_ready = 0; in_data = '0;
    max_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      checks++;
      if (count != ($clog2(DEPTH+1))'(q.size()) || out_valid != (q.size() > 0) ||
          (q.size() > 0 && out_data != q[0])) begin
        failures++;
        if (failures < 10) $display("cycle %0d: count %0d size %0d", c, count, q.size());
      end
      // phases: fill (slow reader), drain (fast reader), random
      out_ready = (c < 1000) ? ($urandom % 8 == 0) : (c < 2000) ? 1'b1 : $urandom % 2;
      push = ($urandom % 2) && (q.size() < DEPTH || (out_ready && q.size() > 0));
      in_data = {$urandom, $urandom, $urandom, $urandom};
      if (out_ready && q.size() > 0) void'(q.pop_front());
      if (push) q.push_back(in_data);
      if (q.size() > max_n) max_n = q.size();
    end
    checks++;
    if (max_n != DEPTH) begin
      failures++;
      $display("buffer never filled (max %0d)", max_n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
