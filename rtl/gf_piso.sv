// gf_piso: parallel-in serial-out shift register.
//
// Holds the multiplier operand B and hands it out least significant digit
// first. `load` copies the N-bit word `pl` into `shreg`; each `shift` moves
// the register right by D bits, filling zeros at the top. `sout` is always
// the low D bits of `shreg`, so the digit in use is visible in the same cycle
// it is consumed. D = 1 gives the bit-serial stream b_0, b_1, ...; D = w the
// digit stream of the digit-serial multiplier. `load` wins over `shift`.
module gf_piso #(
  parameter int unsigned N = gf_pkg::GF_M,   // register length in bits
  parameter int unsigned D = 1               // bits shifted out per step
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [N-1:0] pl,
  output logic [D-1:0] sout,
  output logic [N-1:0] shreg
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     shreg <= '0;
    else if (load)  shreg <= pl;
    else if (shift) shreg <= shreg >> D;
  end

  assign sout = shreg[D-1:0];

endmodule
