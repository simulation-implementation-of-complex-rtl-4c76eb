// add_sub: signed adder/subtractor.
//
// y = a + b when sub = 0 and y = a - b when sub = 1, in two's complement of
// width W, wrapping on overflow (callers size W so that it cannot overflow).
// The subtraction is done as a + ~b + 1, i.e. the same adder with b inverted
// and a carry-in of 1. Purely combinational.
module add_sub #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic                sub,
  output logic signed [W-1:0] y
);

  logic [W-1:0] b_eff;

  always_comb begin
    b_eff = sub ? ~b : b;
    y     = a + signed'(b_eff) + signed'({{(W-1){1'b0}}, sub});
  end

endmodule
