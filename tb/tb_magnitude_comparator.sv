// tb_magnitude_comparator: edge cases (equal, one apart, extremes) and
// random pairs of 17-bit numbers against integer comparison.
module tb_magnitude_comparator;
  localparam int unsigned W = 17;
  logic [W-1:0] a, b;
  logic a_gt_b;
  int checks = 0, failures = 0;

  magnitude_comparator #(.W(W)) dut (.a, .b, .a_gt_b);

  task automatic check(int av, int bv);
    a = W'(av); b = W'(bv);
    #1;
    checks++;
    if (a_gt_b != (av > bv)) begin
      failures++;
      $display("a=%0d b=%0d a_gt_b=%0b", av, bv, a_gt_b);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0); check(1, 0); check(0, 1); check(5, 5); check(6, 5); check(5, 6);
    check(131071, 131070); check(131070, 131071); check(131071, 131071);
    check(65536, 65535); check(65535, 65536);
    for (int n = 0; n < 2000; n++) begin
      int av, bv;
      av = int'($urandom % 131072);
      bv = (n % 4 == 0) ? av + int'($urandom % 3) - 1 : int'($urandom % 131072);
      if (bv < 0) bv = 0;
      if (bv > 131071) bv = 131071;
      check(av, bv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
