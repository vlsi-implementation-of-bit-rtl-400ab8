// tb_gf_mult_driver: reusable stimulus/checker for one GF(2^M) multiplier.
//
// Instantiates the bit-serial (DIGITAL = 0) or digit-serial (DIGITAL = 1)
// multiplier at the given size, runs NTESTS random products under the
// polynomial Q (lower coefficients), with random en stalls in every other
// product, and compares each product with the reference model and each
// latency with the expected number of steps (M, or ceil(M/W)) plus the
// stalled cycles. `checks`, `failures` and `stalls_seen` are running totals;
// `finished` rises when all products are done.
module tb_gf_mult_driver #(
  parameter int unsigned M       = 8,
  parameter int unsigned W       = 8,
  parameter bit          DIGITAL = 1'b1,
  parameter int unsigned NTESTS  = 20,
  parameter logic [M-1:0] Q      = M'(8'h1B)
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   stalls_seen,
  output logic finished
);
  import tb_gf_ref_pkg::*;

  localparam int unsigned STEPS = DIGITAL ? (M + W - 1) / W : M;

  logic start = 1'b0, en = 1'b0;
  logic [M-1:0] a = '0, b = '0, prod;
  logic busy, done;

  if (DIGITAL) begin : g_dsp
    gf_dsp_mult #(.M(M), .W(W)) dut (.clk, .rst_n, .start, .en, .a, .b, .q(Q), .prod, .busy, .done);
  end else begin : g_bsp
    gf_bsp_mult #(.M(M)) dut (.clk, .rst_n, .start, .en, .a, .b, .p(Q), .prod, .busy, .done);
  end

  function automatic logic [M-1:0] rand_elem();
    logic [M-1:0] v = '0;
    for (int i = 0; i < M; i += 32) v = (v << 32) | M'($urandom);
    return v;
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL M=%0d W=%0d digital=%0b %s: a=%h b=%h prod=%h", M, W, DIGITAL, what, a, b, prod);
    end
  endtask

  initial begin
    logic [M-1:0] ta, tb, e;
    int cycles, stalls;
    checks = 0; failures = 0; stalls_seen = 0; finished = 1'b0;
    @(posedge rst_n);
    @(negedge clk);
    for (int t = 0; t < NTESTS; t++) begin
      ta = rand_elem();
      tb = (t == 0) ? M'(1) : rand_elem();
      e  = M'(gf_mul(elem_t'(ta), elem_t'(tb), elem_t'(Q), M));
      a = ta; b = tb;
      start = 1'b1; en = 1'b1;
      @(negedge clk);
      start = 1'b0;
      a = rand_elem(); b = rand_elem();
      cycles = 0; stalls = 0;
      while (!done && cycles < 4 * STEPS + 20) begin
        en = (t % 2 == 0) || ($urandom % 4 != 0);
        if (!en) stalls++;
        @(negedge clk);
        cycles++;
      end
      en = 1'b1;
      stalls_seen += stalls;
      chk(done, "done seen");
      chk(prod == e, "product");
      chk(cycles == int'(STEPS) + stalls, "latency");
    end
    finished = 1'b1;
  end
endmodule
