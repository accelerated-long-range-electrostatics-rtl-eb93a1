// tb_charge_accum: self-checking test of the charge accumulation adders.
// Drives random grid contents and random weighted charges with random valid
// bubbles; every output must equal grid + contribution rescaled from the
// coefficient format to the grid format (imaginary part untouched), exactly
// one cycle after the input.
module tb_charge_accum;
  import lr_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  in_valid, out_valid;
  cplx_t grid_in [NNN3D], grid_out [NNN3D];
  word_t contrib [NNN3D];

  int checks = 0, failures = 0;
  longint exp_re [NNN3D], exp_im [NNN3D];
  logic   exp_v;

  charge_accum dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    foreach (grid_in[p]) begin grid_in[p] = '0; contrib[p] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    exp_v = 0;
    for (int it = 0; it < 400; it++) begin
      // drive a new vector
      in_valid = ($urandom % 4) != 0;
      foreach (grid_in[p]) begin
        grid_in[p].re = word_t'($signed($urandom) >>> 2);
        grid_in[p].im = word_t'($urandom);
        contrib[p]    = word_t'($signed($urandom) >>> 1);
      end
      @(posedge clk);
      foreach (grid_in[p]) begin
        // contribution in Q.27, grid in Q.24: floor division by 8
        longint c;
        c = longint'(contrib[p]);
        exp_re[p] = longint'(grid_in[p].re) + (c < 0 ? -((-c + 7) / 8) : c / 8);
        exp_im[p] = longint'(grid_in[p].im);
      end
      exp_v = in_valid;
      @(negedge clk);
      checks++;
      if (out_valid !== exp_v) begin
        failures++;
        $display("valid mismatch at it %0d", it);
      end
      foreach (grid_out[p]) begin
        checks++;
        if (longint'(grid_out[p].re) != longint'(word_t'(exp_re[p])) ||
            longint'(grid_out[p].im) != exp_im[p]) begin
          failures++;
          if (failures < 10)
            $display("it %0d p %0d: got %0d,%0d exp %0d,%0d", it, p, grid_out[p].re,
                     grid_out[p].im, exp_re[p], exp_im[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
