// tb_complex_multiplier: end-to-end test of the complex multiplier at its
// default size (N = 16, OUT_W = 49).
//
// 1. The three operand sets of the reference simulation, with their printed
//    real and imaginary results.
// 2. Corner operands (zeros, all ones, powers of two).
// 3. A random stream, one operand set per cycle with in_valid sometimes low,
//    checking that each result appears exactly one clock after its operands
//    and that the outputs hold while in_valid is low.
// References are plain integer arithmetic. The test counts the mechanisms
// of the datapath and fails if one never occurred: operand swap in a
// Nikhilam multiplier, upper and lower radix selection, residues on the
// same and on opposite sides, a negative real part, an idle cycle and reset.
module tb_complex_multiplier;
  localparam int unsigned N = 16, OUT_W = 49;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic [N-1:0] xr, xi, yr, yi;
  logic out_valid;
  logic signed [OUT_W-1:0] or_o, oi_o;

  int checks = 0, failures = 0, cycles = 0;
  int n_swap = 0, n_hi = 0, n_lo = 0, n_same = 0, n_opp = 0;
  int n_neg = 0, n_idle = 0, n_reset = 0;

  complex_multiplier dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, want);
    end
  endtask

  // Reference model of the radix choice, independent of the design: the
  // power of two nearest to v (the lower one on a tie, 1 for v = 0).
  function automatic int radix_exp(int v, output bit upper);
    int k;
    k = 0;
    while ((v >> (k + 1)) != 0) k++;
    upper = (2 * v > 3 * (1 << k));
    return upper ? k + 1 : k;
  endfunction

  // Count the datapath events that the operand set a_r..b_i triggers in the
  // four Nikhilam multipliers (xr*yr, xi*yi, xi*yr, xr*yi).
  task automatic count_events(int a_r, int a_i, int b_r, int b_i);
    int ka_r, ka_i, kb_r, kb_i;
    bit ua_r, ua_i, ub_r, ub_i;
    ka_r = radix_exp(a_r, ua_r); ka_i = radix_exp(a_i, ua_i);
    kb_r = radix_exp(b_r, ub_r); kb_i = radix_exp(b_i, ub_i);
    if (ka_r < kb_r || ka_i < kb_i || ka_i < kb_r || ka_r < kb_i) n_swap++;
    if (ua_r) n_hi++; else n_lo++;
    // a residue lies below its radix exactly when the upper radix (or, for
    // zero, radix 1) was chosen
    if ((ua_r || a_r == 0) == (ub_r || b_r == 0)) n_same++; else n_opp++;
  endtask

  // Present one operand set, clock it in, check the registered result.
  task automatic apply(int a_r, int a_i, int b_r, int b_i, bit valid,
                       output longint re, output longint im);
    longint prev_re, prev_im;
    int start;
    prev_re = longint'(or_o);
    prev_im = longint'(oi_o);
    @(negedge clk);
    xr = N'(a_r); xi = N'(a_i); yr = N'(b_r); yi = N'(b_i);
    in_valid = valid;
    re = longint'(a_r) * b_r - longint'(a_i) * b_i;
    im = longint'(a_r) * b_i + longint'(a_i) * b_r;
    count_events(a_r, a_i, b_r, b_i);
    #1 start = cycles;
    @(posedge clk);
    #1;
    expect_eq("latency in cycles", cycles - start, 1);
    expect_eq("out_valid", longint'(out_valid), longint'(valid));
    if (valid) begin
      expect_eq("real part", longint'(or_o), re);
      expect_eq("imaginary part", longint'(oi_o), im);
      if (re < 0) n_neg++;
    end else begin
      n_idle++;
      expect_eq("real part held", longint'(or_o), prev_re);
      expect_eq("imaginary part held", longint'(oi_o), prev_im);
    end
  endtask

  initial begin
    longint re, im;
    rst_n = 1'b0; in_valid = 1'b0; xr = '0; xi = '0; yr = '0; yi = '0;
    repeat (2) @(posedge clk);
    #1;
    expect_eq("out_valid in reset", longint'(out_valid), 0);
    expect_eq("real part in reset", longint'(or_o), 0);
    n_reset++;
    @(negedge clk) rst_n = 1'b1;

    // Reference operand sets and their printed results.
    apply(12345, 2154, 5123, 1742, 1'b1, re, im);
    expect_eq("ref1 Or", longint'(or_o), 59491167);
    expect_eq("ref1 Oi", longint'(oi_o), 32539932);
    apply(11111, 31245, 5123, 1742, 1'b1, re, im);
    expect_eq("ref2 Or", longint'(or_o), 2492863);
    expect_eq("ref2 Oi", longint'(oi_o), 179423497);
    apply(11111, 31245, 2345, 13467, 1'b1, re, im);
    expect_eq("ref3 Or", longint'(or_o), -394721120);
    expect_eq("ref3 Oi", longint'(oi_o), 222901362);

    // Corners.
    apply(0, 0, 0, 0, 1'b1, re, im);
    apply(65535, 65535, 65535, 65535, 1'b1, re, im);
    apply(0, 65535, 65535, 65535, 1'b1, re, im);
    apply(65535, 0, 65535, 65535, 1'b1, re, im);
    apply(32768, 1, 49152, 49153, 1'b1, re, im);
    apply(1, 2, 3, 4, 1'b1, re, im);
    apply(7, 0, 0, 7, 1'b0, re, im);

    // Random stream.
    for (int n = 0; n < 3000; n++)
      apply(int'($urandom % 65536) >> ($urandom % 16), int'($urandom % 65536) >> ($urandom % 16),
            int'($urandom % 65536) >> ($urandom % 16), int'($urandom % 65536) >> ($urandom % 16),
            ($urandom % 5) != 0, re, im);

    // Reset in the middle of operation clears the output register.
    @(negedge clk) rst_n = 1'b0; in_valid = 1'b1;
    @(posedge clk) #1;
    expect_eq("out_valid after reset", longint'(out_valid), 0);
    expect_eq("imaginary part after reset", longint'(oi_o), 0);
    n_reset++;

    $display("events: swap=%0d upper-radix=%0d lower-radix=%0d same-side=%0d opposite-side=%0d negative-real=%0d idle=%0d reset=%0d",
             n_swap, n_hi, n_lo, n_same, n_opp, n_neg, n_idle, n_reset);
    if (n_swap == 0)  begin failures++; $display("operand swap never happened"); end
    if (n_hi == 0)    begin failures++; $display("upper radix never selected"); end
    if (n_lo == 0)    begin failures++; $display("lower radix never selected"); end
    if (n_same == 0)  begin failures++; $display("same-side residues never seen"); end
    if (n_opp == 0)   begin failures++; $display("opposite-side residues never seen"); end
    if (n_neg == 0)   begin failures++; $display("negative real part never seen"); end
    if (n_idle == 0)  begin failures++; $display("idle cycle never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
