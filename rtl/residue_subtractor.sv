// residue_subtractor: residue of an operand against its radix.
//
// Writes the operand as X = radix + Z or X = radix - Z and returns the
// magnitude Z together with the side (vedic_pkg::res_side_e). Both
// differences x - radix and radix - x are formed; the borrow of the first
// picks the non-negative one, so the magnitude is never negative.
//
// Because the radix selection unit picks the power of two nearest to X,
// |Z| <= 2^(N-2) and the magnitude fits in RES_W = N-1 bits; larger
// differences are truncated (they cannot occur when the radix comes from the
// radix selection unit). Purely combinational.
module residue_subtractor
  import vedic_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned RES_W = N - 1
) (
  input  logic [N-1:0]     x,
  input  logic [N:0]       radix,
  output logic [RES_W-1:0] residue,
  output res_side_e        side
);

  logic [N+1:0] x_minus_r;
  logic [N+1:0] r_minus_x;

  always_comb begin
    x_minus_r = {2'b00, x} - {1'b0, radix};
    r_minus_x = {1'b0, radix} - {2'b00, x};
    if (x_minus_r[N+1]) begin      // borrow: X below its radix
      side    = RES_BELOW;
      residue = RES_W'(r_minus_x);
    end else begin
      side    = RES_ABOVE;
      residue = RES_W'(x_minus_r);
    end
  end

  // Above RES_W the magnitude is zero for any radix from the radix
  // selection unit.
  logic unused_hi;
  always_comb unused_hi = ^r_minus_x[N+1:RES_W];

endmodule
