// urdhva_multiplier: unsigned W x W multiplier, "vertically and crosswise".
//
// The product is built one column at a time, from the least significant
// column up. Column c collects every bit product a[i] & b[j] with i + j = c
// (the vertical and crosswise pairs) and adds the carry from column c-1. The
// least significant bit of that sum is product bit c; the remaining bits are
// the carry into column c+1. The carry starts at zero, and the carry left
// after the last column gives the top product bit. All bit products are
// formed in parallel; only the carry ripples from column to column.
//
// Interface: a, b (W bits) in; p (2W bits) out. Purely combinational.
module urdhva_multiplier #(
  parameter int unsigned W = 15
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  // A column holds at most W bit products plus a carry below W.
  localparam int unsigned CW = $clog2(2 * W) + 1;

  logic [CW-1:0] col;
  logic [CW-1:0] carry;

  always_comb begin
    carry = '0;
    p     = '0;
    for (int c = 0; c < 2 * int'(W) - 1; c++) begin
      col = carry;
      for (int i = 0; i < int'(W); i++) begin
        if ((c - i) >= 0 && (c - i) < int'(W))
          col = col + CW'(a[i] & b[c-i]);
      end
      p[c]  = col[0];
      carry = col >> 1;
    end
    p[2*W-1] = carry[0];
  end

endmodule
