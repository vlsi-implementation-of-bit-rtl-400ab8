// gf_counter: step counter of the multiplier controllers.
//
// Counts the bits (or digits) of B already consumed. `clr` returns it to
// zero synchronously at the start of an operation; while `en` is high it
// increments on every clock, and while `en` is low it holds, which stalls the
// operation it is counting.
module gf_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (clr) count <= '0;
    else if (en)  count <= count + 1'b1;
  end

endmodule
