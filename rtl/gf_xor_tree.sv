// gf_xor_tree: addition section of the digit-serial multiplier.
//
// Combinational. Adds W field elements in GF(2^m) with a balanced binary
// tree of XC cells, each XC being an M-bit XOR of two elements, so the depth
// is ceil(log2 W) XOR levels (three for W = 8). The tree is laid out as a
// heap: node k sums nodes 2k+1 and 2k+2, leaves are nodes W-1..2W-2, and the
// root, node 0, is the output.
module gf_xor_tree #(
  parameter int unsigned M = gf_pkg::GF_M,
  parameter int unsigned W = gf_pkg::GF_W
) (
  input  logic [W-1:0][M-1:0] in,
  output logic [M-1:0]        sum
);

  logic [M-1:0] node [2*W-1];

  for (genvar l = 0; l < W; l++) begin : g_leaf
    assign node[W-1+l] = in[l];
  end
  for (genvar k = 0; k < W-1; k++) begin : g_xc
    assign node[k] = node[2*k+1] ^ node[2*k+2];
  end
  assign sum = node[0];

endmodule
