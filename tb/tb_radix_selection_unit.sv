// tb_radix_selection_unit: exhaustive over all 16-bit operands. The
// reference picks the power of two nearest to X from the bracketing pair
// 2^k <= X < 2^(k+1): the upper one only when it is strictly nearer
// (2X > 3 * 2^k), which is the same rule as "X above the mean". Zero maps
// to radix 1. Also counts how often each radix was selected.
module tb_radix_selection_unit;
  localparam int unsigned N = 16;
  logic [N-1:0] x;
  logic [N:0]   radix;
  logic [3:0]   exponent;
  logic         sel_hi;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;

  radix_selection_unit #(.N(N)) dut (.x, .radix, .exponent, .sel_hi);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      int k, lo, exp_radix;
      bit up;
      x = N'(v);
      #1;
      k = 0;
      while ((v >> (k + 1)) != 0) k++;
      lo = 1 << k;
      up = (2 * v > 3 * lo);
      exp_radix = up ? 2 * lo : lo;
      checks++;
      if (int'(radix) != exp_radix || int'(exponent) != k || sel_hi != up) begin
        failures++;
        if (failures < 10)
          $display("x=%0d radix=%0d expected=%0d exponent=%0d sel_hi=%0b", v, radix, exp_radix, exponent, sel_hi);
      end
      if (sel_hi) n_hi++; else n_lo++;
    end
    if (n_hi == 0 || n_lo == 0) failures++;
    $display("upper radix chosen %0d times, lower %0d times", n_hi, n_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
