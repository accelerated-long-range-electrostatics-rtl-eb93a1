// tb_fft_pipeline: self-checking test of the streaming FFT.
// Streams several back-to-back frames of random complex points at the full
// length (32) and then at length 16 (stage bypass), computes the scaled DFT
// X[k] = (1/N) sum x[n] exp(-2 pi i n k / N) in floating point, and compares
// every output point (tolerance 64 LSB) and the latency in cycles.  A third
// run uses the unscaled mode (no 1/N) with smaller inputs.
module tb_fft_pipeline;
  import lr_pkg::*;

  localparam int LOGN = 5;
  localparam int N    = 1 << LOGN;
  localparam int FR   = 4;    // frames per run

  logic clk = 0, rst_n = 0;
  logic [2:0] len;
  logic scale;
  logic in_valid;
  logic [LOGN-1:0] in_idx;
  cplx_t in_data, out_data;
  logic out_valid;
  logic [LOGN-1:0] out_idx;

  int checks = 0, failures = 0;
  int cyc = 0;

  fft_pipeline #(.LOGN(LOGN)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xr [FR][N], xi [FR][N];

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic run(int lg, bit sc);
    int n, t0, got, first_out;
    real er, ei, dv;
    n = 1 << lg;
    len = 3'(lg);
    scale = sc;
    dv = sc ? real'(n) : 1.0;
    for (int f = 0; f < FR; f++)
      for (int k = 0; k < n; k++) begin
        xr[f][k] = real'($signed($urandom) >>> (sc ? 8 : 14));
        xi[f][k] = real'($signed($urandom) >>> (sc ? 8 : 14));
      end
    got = 0;
    first_out = -1;
    @(negedge clk);
    t0 = cyc;
    fork
      begin
        for (int t = 0; t < FR * n + 4 * N + 20; t++) begin
          in_valid = (t < FR * n);
          in_idx   = LOGN'(t);
          if (t < FR * n) begin
            in_data.re = word_t'($rtoi(xr[t / n][t % n]));
            in_data.im = word_t'($rtoi(xi[t / n][t % n]));
          end else in_data = '0;
          @(negedge clk);
        end
      end
      begin
        while (got < FR * n) begin
          @(posedge clk);
          #1;
          if (out_valid) begin
            int f, k;
            f = got / n;
            k = got % n;
            if (first_out < 0) first_out = cyc - t0;
            er = 0.0; ei = 0.0;
            for (int m = 0; m < n; m++) begin
              real a;
              a = -2.0 * 3.14159265358979 * m * k / n;
              er += (xr[f][m] * $cos(a) - xi[f][m] * $sin(a)) / dv;
              ei += (xr[f][m] * $sin(a) + xi[f][m] * $cos(a)) / dv;
            end
            checks++;
            if (rabs(real'(out_data.re) - er) > 64.0 || rabs(real'(out_data.im) - ei) > 64.0
                || out_idx != LOGN'(k)) begin
              failures++;
              if (failures < 10)
                $display("len %0d frame %0d k %0d: got %0d,%0d exp %0.1f,%0.1f", lg, f, k,
                         out_data.re, out_data.im, er, ei);
            end
            got++;
          end
        end
      end
    join
    checks++;
    if (first_out != fft_latency(LOGN, lg)) begin
      failures++;
      $display("latency %0d, expected %0d", first_out, fft_latency(LOGN, lg));
    end
  endtask

  initial begin
    in_valid = 0; in_idx = 0; in_data = '0; len = 3'(LOGN); scale = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(5, 1'b1);
    run(4, 1'b1);
    run(5, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
