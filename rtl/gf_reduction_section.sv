// gf_reduction_section: reduction section of the digit-serial multiplier.
//
// Combinational. From the current multiplicand A^j it forms the W+1
// field elements z^i * A^j mod Q(z), i = 0..W, each in its own cell
// (gf_zmul). Elements 0..W-1 go to the AND section, one per bit of the
// current digit of B; element W is A^(j+1) = z^W * A^j mod Q(z), which is
// written back into the input register for the next digit.
module gf_reduction_section #(
  parameter int unsigned M = gf_pkg::GF_M,
  parameter int unsigned W = gf_pkg::GF_W
) (
  input  logic [M-1:0]      a,    // A^j from the input register
  input  logic [M-1:0]      q,    // lower coefficients of Q(z)
  output logic [W:0][M-1:0] za    // za[i] = z^i * A^j mod Q(z)
);

  for (genvar i = 0; i <= W; i++) begin : g_cell
    gf_zmul #(.M(M), .I(i)) u_cell (
      .a(a),
      .q(q),
      .y(za[i])
    );
  end

endmodule
