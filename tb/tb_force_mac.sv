// tb_force_mac: self-checking test of the 64-term multiply-accumulate.
// Streams random potential and coefficient vectors, one per cycle with random
// bubbles, and checks every result against an integer model (products
// truncated to the coefficient format, exact sum, saturation to 32 bits).
// Checks that the result arrives exactly 7 cycles after its input
// (1 multiply + 6 adder-tree levels), including a saturating case.
module tb_force_mac;
  import lr_pkg::*;

  localparam int LAT = 7;
  localparam int NV  = 300;
  localparam longint MAXV = 64'sd2147483647;
  localparam longint MINV = -64'sd2147483648;

  logic  clk = 0, rst_n = 0;
  logic  in_valid, out_valid;
  word_t pot [NNN3D], coef [NNN3D];
  word_t force_out;

  int checks = 0, failures = 0;
  int cyc = 0;
  longint exp_q [$];
  int     exp_t [$];

  force_mac dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint fl(longint a, longint b, int f);
    longint pr, d;
    pr = a * b;
    d  = longint'(1) << f;
    return pr >= 0 ? pr / d : -((-pr + d - 1) / d);
  endfunction

  // check side: compare every valid output with the oldest expectation
  always @(negedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output at cycle %0d", cyc);
      end else begin
        longint e;
        int t;
        e = exp_q.pop_front();
        t = exp_t.pop_front();
        if (longint'(force_out) != e || cyc - t != LAT) begin
          failures++;
          if (failures < 10)
            $display("cycle %0d: got %0d exp %0d latency %0d", cyc, force_out, e, cyc - t);
        end
      end
    end
  end

  initial begin
    in_valid = 0;
    foreach (pot[p]) begin pot[p] = '0; coef[p] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < NV + 20; it++) begin
      @(negedge clk);
      #1;
      in_valid = (it < NV) && ((it == 5) || (($urandom % 4) != 0));
      foreach (pot[p]) begin
        if (it == 5) begin            // saturating case
          pot[p]  = 32'sh7fffffff;
          coef[p] = word_t'(1 << COEF_FRAC);
        end else begin
          pot[p]  = word_t'($signed($urandom) >>> 4);
          coef[p] = word_t'($signed($urandom) >>> ($urandom % 6));
        end
      end
      if (in_valid) begin
        longint s;
        s = 0;
        foreach (pot[p]) s += longint'(word_t'(fl(longint'(pot[p]), longint'(coef[p]), COEF_FRAC)));
        if (s > MAXV) s = MAXV;
        if (s < MINV) s = MINV;
        exp_q.push_back(s);
        exp_t.push_back(cyc);
      end
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
