// mean_determinant: mean of the two candidate radices.
//
// The radix selection unit brackets its operand X between 2^k and 2^(k+1).
// This block receives both powers of two and returns their mean,
// (2^k + 2^(k+1)) / 2 = 3 * 2^(k-1), rounded down (for k = 0 the mean is 1).
// It is a general (a + b) >> 1 with one extra bit kept for the sum, so it
// never overflows. Purely combinational.
module mean_determinant #(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0] lo_radix,   // 2^k
  input  logic [W-1:0] hi_radix,   // 2^(k+1)
  output logic [W-1:0] mean
);

  logic [W:0] sum;

  always_comb begin
    sum  = {1'b0, lo_radix} + {1'b0, hi_radix};
    mean = W'(sum >> 1);
  end

endmodule
