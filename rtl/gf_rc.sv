// gf_rc: reduction cell RC(i) of the modular reduction unit.
//
// Combinational. When the polynomial coefficient q_i is 1 the cell adds
// (XORs) the feedback bit `yin`, i.e. the coefficient of x^m that falls off
// the top of the register, to the bit `xin` coming from the flip-flop on its
// left. When q_i is 0 the bit passes unchanged. With a fixed polynomial the
// q_i = 0 cells reduce to a wire and the q_i = 1 cells to one XOR gate; here
// q_i is an input so one netlist serves any polynomial of degree m.
module gf_rc (
  input  logic q,     // coefficient q_i of Q(x)
  input  logic xin,   // from the flip-flop on the left
  input  logic yin,   // feedback from the most significant flip-flop
  output logic xout   // to the flip-flop on the right
);

  assign xout = xin ^ (q & yin);

endmodule
