// tb_nikhilam_multiplier: 16 x 16 products against the integer product.
// Operands are corner values (0, 1, all ones, powers of two and their
// neighbours, the radix means 3 * 2^(k-1) and their neighbours) and random
// numbers of random length, so that both radix choices, both residue sides
// and the operand swap (exponent of X below that of Y) all occur; each is
// counted and must happen at least once. The worked decimal examples
// 97 * 94 = 9118 and 325 * 738 = 239850 are checked explicitly.
module tb_nikhilam_multiplier;
  localparam int unsigned N = 16;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  logic           swapped;
  int checks = 0, failures = 0;
  int n_swap = 0, n_same = 0, n_opp = 0;

  nikhilam_multiplier #(.N(N)) dut (.x, .y, .p, .swapped);

  function automatic int corner(int idx);
    int k;
    k = idx % 17;
    case ((idx / 17) % 6)
      0: return (1 << k) - 1;
      1: return (1 << k);
      2: return (1 << k) + 1;
      3: return (k >= 1) ? 3 * (1 << (k - 1)) : 0;
      4: return (k >= 1) ? 3 * (1 << (k - 1)) + 1 : 1;
      default: return (k >= 1) ? 3 * (1 << (k - 1)) - 1 : 0;
    endcase
  endfunction

  // Side of v against the power of two nearest to it (independent of the
  // design): 1 when v lies below that radix.
  function automatic bit below_radix(int v);
    int k;
    k = 0;
    while ((v >> (k + 1)) != 0) k++;
    return (v == 0) || (2 * v > 3 * (1 << k));
  endfunction

  task automatic check(int xv, int yv);
    longint expected;
    if (xv > 65535) xv = 65535;
    if (yv > 65535) yv = 65535;
    x = N'(xv); y = N'(yv);
    #1;
    expected = longint'(xv) * longint'(yv);
    checks++;
    if (longint'(p) != expected) begin
      failures++;
      if (failures < 10) $display("%0d * %0d = %0d, expected %0d", xv, yv, p, expected);
    end
    if (swapped) n_swap++;
    if (below_radix(xv) == below_radix(yv)) n_same++; else n_opp++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // The two worked decimal examples of the method, here in binary.
    check(97, 94);
    checks++; if (p != 32'd9118) failures++;
    check(325, 738);
    checks++; if (p != 32'd239850) failures++;
    for (int i = 0; i < 102; i++)
      for (int j = 0; j < 102; j++)
        check(corner(i), corner(j));
    for (int n = 0; n < 20000; n++)
      check(int'($urandom % 65536) >> ($urandom % 16),
            int'($urandom % 65536) >> ($urandom % 16));
    $display("swaps=%0d same-side=%0d opposite-side=%0d", n_swap, n_same, n_opp);
    if (n_swap == 0 || n_same == 0 || n_opp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
