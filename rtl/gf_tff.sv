// gf_tff: one T flip-flop, the storage cell of the finite field accumulator.
//
// The state toggles on every enabled clock edge whose T input is 1 and holds
// when T is 0. Over a sequence of inputs it therefore keeps their modulo-2
// sum, which is GF(2) addition. `clr` is a synchronous clear used at the
// start of each field operation; `rst_n` is an asynchronous active-low reset.
//
// The toggle is written as q <= q ^ t on the regular clock, with `en`
// qualifying the edge. A hand-built cell would gate the clock with the T
// input instead; a synchronous enable is used here so the design stays on a
// single clean clock.
module gf_tff (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,    // synchronous clear, wins over the toggle
  input  logic en,     // edge qualifier
  input  logic t,      // toggle request
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= 1'b0;
    else if (clr)    q <= 1'b0;
    else if (en & t) q <= ~q;
  end

endmodule
