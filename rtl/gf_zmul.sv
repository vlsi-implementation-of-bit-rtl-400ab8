// gf_zmul: one cell of the reduction section, z^I * A mod Q(z).
//
// Combinational. Multiplies the field element `a` by the constant z^I and
// reduces modulo Q(z), given by its lower coefficients `q`. It is built as I
// cascaded multiply-by-z steps, each a left shift whose overflow bit is fed
// back through the coefficients of Q(z) exactly as in the LFSR of the
// bit-serial multiplier (q[0] is taken as 1). I = 0 is a plain wire.
module gf_zmul #(
  parameter int unsigned M = gf_pkg::GF_M,
  parameter int unsigned I = 1
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] q,
  output logic [M-1:0] y
);

  logic [M-1:0] stage [I+1];

  assign stage[0] = a;
  for (genvar k = 0; k < I; k++) begin : g_step
    logic msb;
    assign msb = stage[k][M-1];
    assign stage[k+1][0] = msb;
    for (genvar i = 1; i < M; i++) begin : g_rc
      gf_rc u_rc (
        .q   (q[i]),
        .xin (stage[k][i-1]),
        .yin (msb),
        .xout(stage[k+1][i])
      );
    end
  end
  assign y = stage[I];

endmodule
