// tb_add_sub: random signed 20-bit operands in both modes, checked against
// integer arithmetic wrapped to 20 bits, plus the overflow wrap at the ends.
module tb_add_sub;
  localparam int unsigned W = 20;
  logic signed [W-1:0] a, b, y;
  logic sub;
  int checks = 0, failures = 0;

  add_sub #(.W(W)) dut (.a, .b, .sub, .y);

  task automatic check(int av, int bv, bit s);
    int r;
    a = W'(av); b = W'(bv); sub = s;
    #1;
    r = s ? (av - bv) : (av + bv);
    // wrap to W bits, signed
    r = r & ((1 << W) - 1);
    if (r >= (1 << (W - 1))) r -= (1 << W);
    checks++;
    if (int'(y) != r) begin
      failures++;
      if (failures < 10) $display("a=%0d b=%0d sub=%0b y=%0d expected=%0d", av, bv, s, y, r);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 0); check(0, 0, 1); check(5, 7, 1); check(-3, -4, 0);
    check(524287, 1, 0); check(-524288, 1, 1);
    for (int n = 0; n < 4000; n++)
      check(int'($urandom % (1 << W)) - (1 << (W - 1)),
            int'($urandom % (1 << W)) - (1 << (W - 1)), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
