// gf_pgcmr: product generator cum modular reduction (PGCMR) unit.
//
// Combinational core of the digit-serial multiplier. For the current
// multiplicand A^j and the W-bit digit B_j = b_{jW} .. b_{jW+W-1} of B it
// produces the digit's partial product
//   pp = sum_{i=0}^{W-1} b_{jW+i} * (z^i * A^j mod Q(z))
// in three sections:
//   * reduction section (gf_reduction_section): z^i * A^j mod Q(z),
//   * AND section: W AND cells (gf_and_unit), cell i gated by b_{jW+i},
//   * addition section (gf_xor_tree): binary tree of W-1 XC cells.
// It also returns A^(j+1) = z^W * A^j mod Q(z) for the input register.
module gf_pgcmr #(
  parameter int unsigned M = gf_pkg::GF_M,
  parameter int unsigned W = gf_pkg::GF_W
) (
  input  logic [M-1:0] aj,       // A^j
  input  logic [M-1:0] q,        // lower coefficients of Q(z)
  input  logic [W-1:0] bd,       // digit of B, bd[i] = b_{jW+i}
  output logic [M-1:0] pp,       // partial product of this digit
  output logic [M-1:0] a_next    // A^(j+1)
);

  logic [W:0][M-1:0]   za;
  logic [W-1:0][M-1:0] ac;

  gf_reduction_section #(.M(M), .W(W)) u_red (
    .a (aj),
    .q (q),
    .za(za)
  );

  for (genvar i = 0; i < W; i++) begin : g_ac
    gf_and_unit #(.M(M)) u_ac (
      .a(za[i]),
      .b(bd[i]),
      .c(ac[i])
    );
  end

  gf_xor_tree #(.M(M), .W(W)) u_add (
    .in (ac),
    .sum(pp)
  );

  assign a_next = za[W];

endmodule
