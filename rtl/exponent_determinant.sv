// exponent_determinant: priority encoder for the leading one.
//
// Returns the bit position of the most significant '1' of `value`, i.e. the
// integer part of log2(value), which the multiplier uses as the exponent k of
// the power of two 2^k <= value. The search runs from the MSB down to the LSB
// in parallel (a priority encoder), as the design describes. `nonzero` is an
// addition of this implementation: the reference only specifies the encoder
// for non-zero inputs, so for value == 0 the exponent is 0 and nonzero is 0.
//
// Purely combinational; W is the input width, EW the exponent width.
module exponent_determinant #(
  parameter int unsigned W  = 16,
  parameter int unsigned EW = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]  value,
  output logic [EW-1:0] exponent,
  output logic          nonzero
);

  always_comb begin
    exponent = '0;
    nonzero  = 1'b0;
    // Scan from LSB to MSB so that the highest set bit is written last and
    // therefore has priority.
    for (int unsigned i = 0; i < W; i++) begin
      if (value[i]) begin
        exponent = EW'(i);
        nonzero  = 1'b1;
      end
    end
  end

endmodule
