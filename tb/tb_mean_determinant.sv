// tb_mean_determinant: for every exponent k of a 17-bit radix pair checks
// mean = 3 * 2^(k-1) (1 for k = 0), then random pairs against (a + b) / 2.
module tb_mean_determinant;
  localparam int unsigned W = 17;
  logic [W-1:0] lo_radix, hi_radix, mean;
  int checks = 0, failures = 0;

  mean_determinant #(.W(W)) dut (.lo_radix, .hi_radix, .mean);

  task automatic check(longint expected);
    #1;
    checks++;
    if (longint'(mean) != expected) begin
      failures++;
      $display("lo=%0d hi=%0d mean=%0d expected=%0d", lo_radix, hi_radix, mean, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < int'(W) - 1; k++) begin
      lo_radix = W'(1) << k;
      hi_radix = W'(1) << (k + 1);
      check((k == 0) ? 1 : 3 * (longint'(1) << (k - 1)));
    end
    for (int n = 0; n < 1000; n++) begin
      lo_radix = W'($urandom);
      hi_radix = W'($urandom);
      check((longint'(lo_radix) + longint'(hi_radix)) / 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
