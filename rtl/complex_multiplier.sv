// complex_multiplier: (xr + j xi) * (yr + j yi) with Vedic multipliers.
//
// The direct four-multiplier form is used:
//   o1 = xr * yr,  o2 = xi * yi,  o3 = xi * yr,  o4 = xr * yi
//   or_o = o1 - o2,  oi_o = o4 + o3
// Each of the four products comes from a Nikhilam multiplier (radix
// selection, residues, a small vertically-and-crosswise multiplier, shifts
// and add/subtract). A subtractor forms the real part and an adder the
// imaginary part, both signed, at OUT_W bits (49 by default, the width the
// reference simulation shows; only 2N+1 bits carry information, the rest
// is sign extension).
//
// The operand parts are N-bit unsigned numbers. The whole multiplier is
// combinational; its results are captured in one output register, so
// or_o/oi_o and out_valid appear one clock after the operands and in_valid
// are presented, and a new operand set may be presented every cycle. The
// register and its active-low synchronous reset (which clears out_valid and
// the results) are choices of this implementation.
module complex_multiplier
#(
  parameter int unsigned N     = vedic_pkg::DATA_W,
  parameter int unsigned OUT_W = vedic_pkg::OUT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [N-1:0]            xr,
  input  logic [N-1:0]            xi,
  input  logic [N-1:0]            yr,
  input  logic [N-1:0]            yi,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] or_o,
  output logic signed [OUT_W-1:0] oi_o
);

  if (OUT_W < 2 * N + 1) begin : g_width_check
    $error("complex_multiplier: OUT_W must be at least 2*N+1");
  end

  logic [2*N-1:0] o1, o2, o3, o4;
  logic [3:0]     swapped;

  nikhilam_multiplier #(.N(N)) u_mul_rr (.x(xr), .y(yr), .p(o1), .swapped(swapped[0]));
  nikhilam_multiplier #(.N(N)) u_mul_ii (.x(xi), .y(yi), .p(o2), .swapped(swapped[1]));
  nikhilam_multiplier #(.N(N)) u_mul_ir (.x(xi), .y(yr), .p(o3), .swapped(swapped[2]));
  nikhilam_multiplier #(.N(N)) u_mul_ri (.x(xr), .y(yi), .p(o4), .swapped(swapped[3]));

  logic signed [OUT_W-1:0] re_next, im_next;

  add_sub #(.W(OUT_W)) u_sub_re (
    .a   (signed'(OUT_W'(o1))),
    .b   (signed'(OUT_W'(o2))),
    .sub (1'b1),
    .y   (re_next)
  );

  add_sub #(.W(OUT_W)) u_add_im (
    .a   (signed'(OUT_W'(o4))),
    .b   (signed'(OUT_W'(o3))),
    .sub (1'b0),
    .y   (im_next)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      or_o      <= '0;
      oi_o      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        or_o <= re_next;
        oi_o <= im_next;
      end
    end
  end

  logic unused_swapped;
  always_comb unused_swapped = ^swapped;

endmodule
