// gf_input_reg: input register of the digit-serial multiplier.
//
// M D flip-flops holding the multiplicand A^j of the current digit. `load`
// initialises it with the operand A (A^0); each `adv` replaces it with
// A^(j+1) = z^W * A^j mod Q(z) from the reduction section. `load` wins over
// `adv`; `rst_n` clears it asynchronously.
module gf_input_reg #(
  parameter int unsigned M = gf_pkg::GF_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         adv,
  input  logic [M-1:0] a,        // operand A
  input  logic [M-1:0] a_next,   // z^W * A^j mod Q(z)
  output logic [M-1:0] aj
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    aj <= '0;
    else if (load) aj <= a;
    else if (adv)  aj <= a_next;
  end

endmodule
