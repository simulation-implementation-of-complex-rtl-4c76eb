// vedic_pkg: constants and types shared by the Vedic complex multiplier.
//
// DATA_W is the width of each unsigned real or imaginary operand part
// (16 bits, as in the reference design). OUT_W is the width of the signed
// complex result parts; the reference simulation prints them as 49-bit
// values, which is wider than the 2*DATA_W+1 bits the result needs, so the
// upper bits are sign extension.
//
// res_side_e tells on which side of its power-of-two radix an operand lies:
// X = radix + Z (RES_ABOVE) or X = radix - Z (RES_BELOW). The Nikhilam
// datapath keeps residues as magnitude plus side, and the side decides
// whether each adder/subtractor adds or subtracts.
package vedic_pkg;

  localparam int unsigned DATA_W = 16;
  localparam int unsigned OUT_W  = 49;

  typedef enum logic {
    RES_ABOVE = 1'b0,  // operand = radix + residue
    RES_BELOW = 1'b1   // operand = radix - residue
  } res_side_e;

endpackage
