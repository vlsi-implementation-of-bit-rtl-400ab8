// gf_and_unit: AND unit (AU) / AND cell (AC).
//
// Combinational partial-product generator: every bit of the M-bit field
// element `a` is ANDed with the single multiplier bit `b`, giving b * a in
// GF(2^m) (either a or zero). The bit-serial multiplier uses one of these
// with b = b_j; the digit-serial multiplier uses w of them, one per bit of
// the current digit.
module gf_and_unit #(
  parameter int unsigned M = gf_pkg::GF_M
) (
  input  logic [M-1:0] a,
  input  logic         b,
  output logic [M-1:0] c
);

  assign c = a & {M{b}};

endmodule
