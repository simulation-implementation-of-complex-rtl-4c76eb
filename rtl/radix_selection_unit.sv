// radix_selection_unit (RSU): picks the power-of-two base nearest to X.
//
// An N-bit operand with its leading one at bit k lies in [2^k, 2^(k+1)).
// The unit follows the structure of the reference RSU:
//   exponent determinant  k = position of the leading one of X
//   adder (carry-in 1)    k + 1
//   shifter               2^k     = (N+1)-bit constant 1 shifted left by k
//   shifter               2^(k+1) = the same constant shifted by k + 1
//   mean determinant      mean = (2^k + 2^(k+1)) / 2 = 3 * 2^(k-1)
//   comparator            X > mean
//   multiplexer           radix = (X > mean) ? 2^(k+1) : 2^k
// X equal to the mean selects 2^k (a choice of this implementation). X = 0
// gives k = 0 and radix 1.
//
// Interface: x (N bits) in; radix (N+1 bits, one-hot), the exponent k of X
// and the select bit (`sel_hi`, 1 when the upper radix was chosen) out.
// Purely combinational.
module radix_selection_unit #(
  parameter int unsigned N  = 16,
  parameter int unsigned EW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0] x,
  output logic [N:0]   radix,
  output logic [EW-1:0] exponent,
  output logic         sel_hi
);

  logic          nonzero;
  logic [EW:0]   exp_inc;
  logic [N:0]    lo_radix;
  logic [N:0]    hi_radix;
  logic [N:0]    mean;
  localparam logic [N:0] ONE = (N+1)'(1);

  exponent_determinant #(.W(N), .EW(EW)) u_ed (
    .value    (x),
    .exponent (exponent),
    .nonzero  (nonzero)
  );

  // Adder with carry-in tied to 1: k + 1.
  always_comb exp_inc = {1'b0, exponent} + (EW+1)'(1);

  left_shifter #(.IN_W(N+1), .OUT_W(N+1), .SH_W(EW)) u_shift_lo (
    .in     (ONE),
    .amount (exponent),
    .out    (lo_radix)
  );

  left_shifter #(.IN_W(N+1), .OUT_W(N+1), .SH_W(EW+1)) u_shift_hi (
    .in     (ONE),
    .amount (exp_inc),
    .out    (hi_radix)
  );

  mean_determinant #(.W(N+1)) u_md (
    .lo_radix (lo_radix),
    .hi_radix (hi_radix),
    .mean     (mean)
  );

  magnitude_comparator #(.W(N+1)) u_cmp (
    .a      ({1'b0, x}),
    .b      (mean),
    .a_gt_b (sel_hi)
  );

  always_comb radix = sel_hi ? hi_radix : lo_radix;

  // nonzero is not needed here: a zero operand simply gets radix 1.
  logic unused_nonzero;
  always_comb unused_nonzero = nonzero;

endmodule
