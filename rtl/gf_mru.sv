// gf_mru: modular reduction unit of the bit-serial/parallel multiplier.
//
// M D flip-flops r[0..M-1] with a reduction cell RC(i) in front of every
// flip-flop except the first, wired as a Galois LFSR. On `load` the register
// takes the operand A in parallel. Each `shift` then multiplies the content
// by x and reduces it modulo Q(x):
//   r[0] <- r[M-1]
//   r[i] <- r[i-1] XOR (q_i AND r[M-1]),  i = 1..M-1
// so after j shifts r = x^j * A mod Q(x), the multiplicand the AND unit needs
// for bit b_j of B.
//
// q[0] is not read: the constant term of an irreducible Q(x) is always 1 and
// the feedback goes straight into r[0]. `load` wins over `shift`. Both are
// synchronous; `rst_n` clears the register asynchronously.
module gf_mru #(
  parameter int unsigned M = gf_pkg::GF_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [M-1:0] a,      // operand loaded in parallel
  input  logic [M-1:0] q,      // lower coefficients of Q(x)
  output logic [M-1:0] r       // x^j * A mod Q(x)
);

  logic [M-1:0] r_next;

  assign r_next[0] = r[M-1];
  for (genvar i = 1; i < M; i++) begin : g_rc
    gf_rc u_rc (
      .q   (q[i]),
      .xin (r[i-1]),
      .yin (r[M-1]),
      .xout(r_next[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     r <= '0;
    else if (load)  r <= a;
    else if (shift) r <= r_next;
  end

endmodule
