// gf_bsp_mult: bit-serial/parallel multiplier over GF(2^m), general Q(x).
//
// Computes prod = A * B mod Q(x) for any reduction polynomial of degree M
// given at run time as its lower coefficients `p`. A is used in parallel, B
// one bit per cycle, least significant bit first:
//   prod = sum_j b_j * (x^j * A mod Q(x)),  j = 0..M-1
// Three units do this:
//   * MRU (gf_mru): an LFSR holding x^j * A mod Q(x),
//   * AU (gf_and_unit): M AND gates forming b_j * (x^j * A mod Q(x)),
//   * FFA (gf_ffa): M T flip-flops that add the partial products up.
// A parallel-in serial-out register (gf_piso) supplies b_j and a counter
// (gf_counter) counts the M steps.
//
// Timing: `start` (one cycle) loads A into the MRU and B into the shift
// register and clears the accumulator and counter. Each following cycle with
// `en` high consumes one bit; cycles with `en` low stall every register. With
// `en` held high, `done` is a one-cycle pulse M+1 cycles after `start`
// (1 load cycle + M accumulate cycles), and `prod` then holds the product
// until the next `start`. `busy` is high while bits remain. A `start` during
// an operation aborts it and begins a new one. `rst_n` is an asynchronous
// active-low reset: operation only proceeds while it is high.
//
// The structure (MRU, AU and FFA and their wiring) follows the published
// architecture; the start/en/done/busy sequencing is this design's own.
module gf_bsp_mult #(
  parameter int unsigned M = gf_pkg::GF_M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         en,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic [M-1:0] p,      // lower coefficients of Q(x); p[0] taken as 1
  output logic [M-1:0] prod,
  output logic         busy,
  output logic         done
);

  import gf_pkg::*;

  localparam int unsigned CW = $clog2(M) + 1;

  gf_state_e      state;
  logic [CW-1:0]  count;
  logic           step, last;
  logic [M-1:0]   mru_r, au_c;
  logic           b_j;

  assign step = (state == ST_RUN) && en && !start;
  assign last = (count == CW'(M - 1));
  assign busy = (state == ST_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      done  <= 1'b0;
    end else begin
      done <= step && last;
      if (start)             state <= ST_RUN;
      else if (step && last) state <= ST_IDLE;
    end
  end

  gf_counter #(.WIDTH(CW)) u_cnt (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (start),
    .en   (step),
    .count(count)
  );

  gf_piso #(.N(M), .D(1)) u_breg (
    .clk  (clk),
    .rst_n(rst_n),
    .load (start),
    .shift(step),
    .pl   (b),
    .sout (b_j),
    .shreg()
  );

  gf_mru #(.M(M)) u_mru (
    .clk  (clk),
    .rst_n(rst_n),
    .load (start),
    .shift(step),
    .a    (a),
    .q    (p),
    .r    (mru_r)
  );

  gf_and_unit #(.M(M)) u_au (
    .a(mru_r),
    .b(b_j),
    .c(au_c)
  );

  gf_ffa #(.M(M)) u_ffa (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (start),
    .en   (step),
    .d    (au_c),
    .s    (prod)
  );

endmodule
