// magnitude_comparator: unsigned "greater than" comparator.
//
// In the radix selection unit it compares the operand with the mean of the
// two candidate radices; `a_gt_b` selects the upper radix. An operand equal
// to the mean gives 0, i.e. the lower radix (the design only defines the
// strictly greater and strictly smaller cases). Purely combinational.
module magnitude_comparator #(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         a_gt_b
);

  always_comb a_gt_b = (a > b);

endmodule
