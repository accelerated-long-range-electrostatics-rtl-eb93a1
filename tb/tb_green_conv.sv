// tb_green_conv: self-checking test of the Green's function multipliers.
// Random complex grid values are multiplied by random real Green's values;
// each output must equal floor(value * green / 2**GREEN_FRAC) for both parts,
// one cycle after the input, with out_valid following in_valid.
module tb_green_conv;
  import lr_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  in_valid, out_valid;
  cplx_t in_data [NNN3D], out_data [NNN3D];
  word_t green [NNN3D];

  int checks = 0, failures = 0;
  longint exp_re [NNN3D], exp_im [NNN3D];
  logic   exp_v;

  green_conv dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // floor(a * b / 2**f) using real-free integer arithmetic
  function automatic longint fl(longint a, longint b, int f);
    longint pr, d;
    pr = a * b;
    d  = longint'(1) << f;
    return pr >= 0 ? pr / d : -((-pr + d - 1) / d);
  endfunction

  initial begin
    in_valid = 0;
    foreach (in_data[p]) begin in_data[p] = '0; green[p] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      in_valid = ($urandom % 3) != 0;
      foreach (in_data[p]) begin
        in_data[p].re = word_t'($signed($urandom) >>> ($urandom % 8));
        in_data[p].im = word_t'($signed($urandom) >>> ($urandom % 8));
        green[p]      = word_t'($urandom % (1 << 26));   // 0 .. 4.0 in Q.24
      end
      @(posedge clk);
      foreach (in_data[p]) begin
        exp_re[p] = fl(longint'(in_data[p].re), longint'(green[p]), GREEN_FRAC);
        exp_im[p] = fl(longint'(in_data[p].im), longint'(green[p]), GREEN_FRAC);
      end
      exp_v = in_valid;
      @(negedge clk);
      checks++;
      if (out_valid !== exp_v) begin
        failures++;
        $display("valid mismatch at it %0d", it);
      end
      foreach (out_data[p]) begin
        checks++;
        if (longint'(out_data[p].re) != longint'(word_t'(exp_re[p])) ||
            longint'(out_data[p].im) != longint'(word_t'(exp_im[p]))) begin
          failures++;
          if (failures < 10)
            $display("it %0d p %0d: got %0d,%0d exp %0d,%0d", it, p, out_data[p].re,
                     out_data[p].im, exp_re[p], exp_im[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
