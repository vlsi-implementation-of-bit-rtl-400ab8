// gf_mult_top: the two GF(2^m) standard-basis multipliers side by side.
//
// Both multipliers compute A * B mod Q(x) with a finite field accumulator
// of T flip-flops as the result register:
//   * bsp_*: bit-serial/parallel multiplier (gf_bsp_mult), one bit of B per
//     cycle, M+1 cycles per product, smallest datapath;
//   * dsp_*: digit-serial/parallel multiplier (gf_dsp_mult), W bits of B per
//     cycle, ceil(M/W)+1 cycles per product.
// Each has its own start/en/operand/polynomial inputs and its own
// prod/busy/done outputs, so they can be used independently or fed the same
// operands for comparison. Clock and active-low asynchronous reset are
// shared. See the two submodules for the cycle-level protocol.
module gf_mult_top #(
  parameter int unsigned M = gf_pkg::GF_M,
  parameter int unsigned W = gf_pkg::GF_W
) (
  input  logic         clk,
  input  logic         rst_n,
  // bit-serial/parallel multiplier
  input  logic         bsp_start,
  input  logic         bsp_en,
  input  logic [M-1:0] bsp_a,
  input  logic [M-1:0] bsp_b,
  input  logic [M-1:0] bsp_p,
  output logic [M-1:0] bsp_prod,
  output logic         bsp_busy,
  output logic         bsp_done,
  // digit-serial/parallel multiplier
  input  logic         dsp_start,
  input  logic         dsp_en,
  input  logic [M-1:0] dsp_a,
  input  logic [M-1:0] dsp_b,
  input  logic [M-1:0] dsp_q,
  output logic [M-1:0] dsp_prod,
  output logic         dsp_busy,
  output logic         dsp_done
);

  gf_bsp_mult #(.M(M)) u_bsp (
    .clk  (clk),
    .rst_n(rst_n),
    .start(bsp_start),
    .en   (bsp_en),
    .a    (bsp_a),
    .b    (bsp_b),
    .p    (bsp_p),
    .prod (bsp_prod),
    .busy (bsp_busy),
    .done (bsp_done)
  );

  gf_dsp_mult #(.M(M), .W(W)) u_dsp (
    .clk  (clk),
    .rst_n(rst_n),
    .start(dsp_start),
    .en   (dsp_en),
    .a    (dsp_a),
    .b    (dsp_b),
    .q    (dsp_q),
    .prod (dsp_prod),
    .busy (dsp_busy),
    .done (dsp_done)
  );

endmodule
