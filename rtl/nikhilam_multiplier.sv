// nikhilam_multiplier: unsigned N x N multiplier after the Nikhilam sutra.
//
// Each operand is written against its own power-of-two radix,
//   X = 2^k1 +/- Z1,   Y = 2^k2 +/- Z2,
// where the radix selection unit picks the power of two nearest to the
// operand, so the residues Z1, Z2 are at most a quarter of the operand
// range. With k1 >= k2 the product is
//   P = 2^k2 * (X +/- Z2 * 2^(k1-k2)) +/- Z1 * Z2,
// so the one full multiplication is replaced by a multiplication of the two
// small residues (N-1 bits each, done by the vertically-and-crosswise
// multiplier), two shifts and two additions/subtractions.
//
// Datapath, in the order of the reference block diagram:
//   RSU (X), RSU (Y)                radices 2^k1, 2^k2
//   subtractor (X), subtractor (Y)  residues Z1, Z2 with their sides
//   exponent determinant x 2        k1, k2 from the selected radices
//   subtractor                      d = k1 - k2
//   shifter                         Z2 << d
//   adder/subtractor                S = X + Z2<<d  (Y above its radix)
//                                   S = X - Z2<<d  (Y below its radix)
//   multiplier                      M = Z1 * Z2
//   shifter                         S << k2
//   adder/subtractor                P = (S << k2) + M (same sides)
//                                   P = (S << k2) - M (opposite sides)
// The formula needs k1 >= k2. When k1 < k2 this implementation swaps the
// roles of the two operands (with their residues and sides) before the
// exponent subtractor; `swapped` reports it. The intermediate values are
// signed and INT_W = 2N+3 bits wide, enough for every operand pair; the
// final result is exact and is returned as 2N unsigned bits.
//
// Interface: x, y (N bits) in; p = x * y (2N bits) out; swapped (status)
// out. Purely combinational.
module nikhilam_multiplier
  import vedic_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p,
  output logic           swapped
);

  localparam int unsigned RES_W = N - 1;               // residue magnitude
  localparam int unsigned EW    = (N > 1) ? $clog2(N) : 1;  // exponent of X
  localparam int unsigned KW    = $clog2(N + 1);       // exponent of radix
  localparam int unsigned INT_W = 2 * N + 3;           // signed intermediates

  // ---- radix selection and residues ------------------------------------
  logic [N:0]       radix_x, radix_y;
  logic [EW-1:0]    lead_x, lead_y;
  logic             hi_x, hi_y;
  logic [RES_W-1:0] z1, z2;
  res_side_e        side1, side2;
  logic [KW-1:0]    k1, k2;
  logic             nz_x, nz_y;

  radix_selection_unit #(.N(N), .EW(EW)) u_rsu_x (
    .x (x), .radix (radix_x), .exponent (lead_x), .sel_hi (hi_x)
  );
  radix_selection_unit #(.N(N), .EW(EW)) u_rsu_y (
    .x (y), .radix (radix_y), .exponent (lead_y), .sel_hi (hi_y)
  );

  residue_subtractor #(.N(N), .RES_W(RES_W)) u_sub_x (
    .x (x), .radix (radix_x), .residue (z1), .side (side1)
  );
  residue_subtractor #(.N(N), .RES_W(RES_W)) u_sub_y (
    .x (y), .radix (radix_y), .residue (z2), .side (side2)
  );

  exponent_determinant #(.W(N + 1), .EW(KW)) u_ed_x (
    .value (radix_x), .exponent (k1), .nonzero (nz_x)
  );
  exponent_determinant #(.W(N + 1), .EW(KW)) u_ed_y (
    .value (radix_y), .exponent (k2), .nonzero (nz_y)
  );

  // ---- operand ordering: the operand with the larger exponent is "a" ----
  logic [N-1:0]     op_a;
  logic [RES_W-1:0] z_a, z_b;
  res_side_e        side_a, side_b;
  logic [KW-1:0]    k_a, k_b;

  always_comb begin
    swapped = (k1 < k2);
    if (swapped) begin
      op_a = y;  z_a = z2; z_b = z1; side_a = side2; side_b = side1;
      k_a  = k2; k_b = k1;
    end else begin
      op_a = x;  z_a = z1; z_b = z2; side_a = side1; side_b = side2;
      k_a  = k1; k_b = k2;
    end
  end

  // ---- exponent subtractor: d = k_a - k_b (never negative) --------------
  logic signed [KW:0] exp_diff;

  add_sub #(.W(KW + 1)) u_exp_sub (
    .a   (signed'({1'b0, k_a})),
    .b   (signed'({1'b0, k_b})),
    .sub (1'b1),
    .y   (exp_diff)
  );

  // ---- shifter: Z_b * 2^d -----------------------------------------------
  logic [INT_W-1:0] zb_shifted;

  left_shifter #(.IN_W(RES_W), .OUT_W(INT_W), .SH_W(KW)) u_shift_res (
    .in     (z_b),
    .amount (KW'(exp_diff)),
    .out    (zb_shifted)
  );

  // ---- adder/subtractor: S = A +/- Z_b * 2^d -----------------------------
  logic signed [INT_W-1:0] s_sum;

  add_sub #(.W(INT_W)) u_addsub_s (
    .a   (signed'(INT_W'(op_a))),
    .b   (signed'(zb_shifted)),
    .sub (side_b == RES_BELOW),
    .y   (s_sum)
  );

  // ---- shifter: S * 2^k_b -------------------------------------------------
  logic [INT_W-1:0] s_shifted;

  left_shifter #(.IN_W(INT_W), .OUT_W(INT_W), .SH_W(KW)) u_shift_s (
    .in     (s_sum),
    .amount (k_b),
    .out    (s_shifted)
  );

  // ---- multiplier: Z_a * Z_b ---------------------------------------------
  logic [2*RES_W-1:0] z_prod;

  urdhva_multiplier #(.W(RES_W)) u_mul (
    .a (z_a),
    .b (z_b),
    .p (z_prod)
  );

  // ---- adder/subtractor: P = S*2^k_b +/- Z_a*Z_b -------------------------
  logic signed [INT_W-1:0] p_full;

  add_sub #(.W(INT_W)) u_addsub_p (
    .a   (signed'(s_shifted)),
    .b   (signed'(INT_W'(z_prod))),
    .sub (side_a != side_b),
    .y   (p_full)
  );

  always_comb p = p_full[2*N-1:0];

  // The radices are one-hot, never zero; the upper sum bits and the RSU
  // side outputs carry no further information.
  logic unused;
  always_comb unused = ^{nz_x, nz_y, lead_x, lead_y, hi_x, hi_y,
                         exp_diff[KW], p_full[INT_W-1:2*N]};

endmodule
