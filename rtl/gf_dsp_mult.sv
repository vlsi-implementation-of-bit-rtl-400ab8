// gf_dsp_mult: digit-serial/parallel multiplier over GF(2^m).
//
// Computes prod = A * B mod Q(z) by splitting B into N = ceil(M/W) digits of
// W bits and consuming one digit per cycle, least significant digit first:
//   prod = sum_j sum_i b_{jW+i} * (z^(jW+i) * A mod Q(z))
// The input register keeps A^j = z^(jW) * A mod Q(z); the PGCMR unit forms
// the digit's partial product and A^(j+1); the finite field accumulator (T
// flip-flops) adds the partial products. B is held in a parallel-in
// serial-out register that shifts W bits per step (zero-padded to N*W bits).
// The reduction polynomial is a run-time input, so trinomials such as
// z^233 + z^73 + 1 and any other Q(z) of degree M are handled alike.
//
// Timing: `start` (one cycle) loads A and B and clears the accumulator and
// counter. Each following cycle with `en` high consumes one digit; `en` low
// stalls. With `en` held high, `done` pulses N+1 cycles after `start`
// (2 cycles at the default M = W = 8) and `prod` holds the product until the
// next `start`. `busy` is high while digits remain. `rst_n` is an
// asynchronous active-low reset.
//
// The datapath (input register, reduction, AND and addition sections,
// accumulator) follows the published architecture; the digit register for
// B and the start/en/done/busy sequencing are this design's own.
module gf_dsp_mult #(
  parameter int unsigned M = gf_pkg::GF_M,
  parameter int unsigned W = gf_pkg::GF_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         en,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic [M-1:0] q,      // lower coefficients of Q(z); q[0] taken as 1
  output logic [M-1:0] prod,
  output logic         busy,
  output logic         done
);

  import gf_pkg::*;

  localparam int unsigned N  = (M + W - 1) / W;   // digits in B
  localparam int unsigned NB = N * W;             // padded width of B
  localparam int unsigned CW = $clog2(N) + 1;

  gf_state_e     state;
  logic [CW-1:0] count;
  logic          step, last;
  logic [M-1:0]  aj, a_next, pp;
  logic [W-1:0]  bd;
  logic [NB-1:0] b_pad;

  assign b_pad = NB'(b);
  assign step  = (state == ST_RUN) && en && !start;
  assign last  = (count == CW'(N - 1));
  assign busy  = (state == ST_RUN);

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

  gf_piso #(.N(NB), .D(W)) u_breg (
    .clk  (clk),
    .rst_n(rst_n),
    .load (start),
    .shift(step),
    .pl   (b_pad),
    .sout (bd),
    .shreg()
  );

  gf_input_reg #(.M(M)) u_inreg (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (start),
    .adv   (step),
    .a     (a),
    .a_next(a_next),
    .aj    (aj)
  );

  gf_pgcmr #(.M(M), .W(W)) u_pgcmr (
    .aj    (aj),
    .q     (q),
    .bd    (bd),
    .pp    (pp),
    .a_next(a_next)
  );

  gf_ffa #(.M(M)) u_ffa (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (start),
    .en   (step),
    .d    (pp),
    .s    (prod)
  );

endmodule
