// left_shifter: logical left shift by a variable amount.
//
// out = in << amount, truncated to OUT_W bits and zero-filled from the right.
// The design uses it to build the powers of two 2^k and 2^(k+1) from the
// constant 1 inside the radix selection unit, to align the second residue by
// 2^(k1-k2) and to scale the partial result by 2^k2 in the Nikhilam
// multiplier. Implemented as a logarithmic barrel shifter (one stage per bit
// of `amount`). Purely combinational.
module left_shifter #(
  parameter int unsigned IN_W  = 17,
  parameter int unsigned OUT_W = 17,
  parameter int unsigned SH_W  = 5
) (
  input  logic [IN_W-1:0]  in,
  input  logic [SH_W-1:0]  amount,
  output logic [OUT_W-1:0] out
);

  logic [OUT_W-1:0] stage [SH_W+1];

  always_comb begin
    stage[0] = OUT_W'(in);
    for (int unsigned s = 0; s < SH_W; s++) begin
      if (amount[s]) stage[s+1] = stage[s] << (1 << s);
      else           stage[s+1] = stage[s];
    end
    out = stage[SH_W];
  end

endmodule
