// tb_residue_subtractor: operands near a power-of-two radix (within the
// quarter-range the radix selection guarantees), on both sides and at the
// radix itself; checks magnitude and side against signed integer
// subtraction.
module tb_residue_subtractor;
  import vedic_pkg::*;
  localparam int unsigned N = 16;
  logic [N-1:0] x;
  logic [N:0]   radix;
  logic [N-2:0] residue;
  res_side_e    side;
  int checks = 0, failures = 0, n_above = 0, n_below = 0;

  residue_subtractor #(.N(N)) dut (.x, .radix, .residue, .side);

  task automatic check(int xv, int k);
    int d;
    res_side_e exp_side;
    x = N'(xv); radix = (N+1)'(1) << k;
    #1;
    d = xv - (1 << k);
    exp_side = (d < 0) ? RES_BELOW : RES_ABOVE;
    checks++;
    if (int'(residue) != ((d < 0) ? -d : d) || side != exp_side) begin
      failures++;
      if (failures < 10) $display("x=%0d radix=%0d residue=%0d side=%s", xv, 1 << k, residue, side.name());
    end
    if (exp_side == RES_ABOVE) n_above++; else n_below++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0); check(1, 0); check(65535, 16); check(49152, 15); check(49153, 16);
    for (int n = 0; n < 5000; n++) begin
      int k, span, xv;
      k = int'($urandom % 17);
      span = (k >= 2) ? (1 << (k - 2)) : 1;
      xv = (1 << k) + int'($urandom % (2 * span + 1)) - span;
      if (xv < 0) xv = 0;
      if (xv > 65535) xv = 65535;
      check(xv, k);
    end
    if (n_above == 0 || n_below == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
