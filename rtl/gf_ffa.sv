// gf_ffa: finite field accumulator over GF(2^m).
//
// A row of M T flip-flops, one per coefficient. Each enabled cycle the
// M-bit field element `d` is presented in parallel; bit i toggles flip-flop i
// when it is 1. After n elements have been fed in, s = d_0 + d_1 + ... +
// d_{n-1} in GF(2^m), i.e. the bitwise XOR of all of them, without any
// explicit XOR gate in front of the storage.
//
// Interface: `clr` (synchronous) empties the accumulator at the start of
// each field operation, `en` admits the current `d`. `s` is the registered
// sum and changes one clock after the element that changes it.
module gf_ffa #(
  parameter int unsigned M = gf_pkg::GF_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [M-1:0] d,
  output logic [M-1:0] s
);

  for (genvar i = 0; i < M; i++) begin : g_bit
    gf_tff u_tff (
      .clk  (clk),
      .rst_n(rst_n),
      .clr  (clr),
      .en   (en),
      .t    (d[i]),
      .q    (s[i])
    );
  end

endmodule
