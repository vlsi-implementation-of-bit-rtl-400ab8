// tb_gf_pgcmr: self-checking test of the product generator cum modular
// reduction unit. With A^j = A the partial product of a full 8-bit digit is
// the whole product A * B mod Q(z); a_next must be z^8 * A mod Q(z). Covers
// the worked example 0x83 * 0x57 = 0xC1 and random operands.
module tb_gf_pgcmr;
  import tb_gf_ref_pkg::*;
  localparam int unsigned M = 8;
  localparam int unsigned W = 8;
  logic clk = 1'b0;
  logic [M-1:0] aj, q, pp, a_next;
  logic [W-1:0] bd;
  int checks = 0, failures = 0;

  gf_pgcmr #(.M(M), .W(W)) dut (.aj, .q, .bd, .pp, .a_next);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] e_pp, e_an;
    for (int t = 0; t < 500; t++) begin
      aj = (t == 0) ? 8'h83 : M'($urandom);
      bd = (t == 0) ? 8'h57 : W'($urandom);
      q  = (t % 2 == 0) ? 8'h1B : (M'($urandom) | 8'h01);
      @(negedge clk);
      e_pp = (t == 0) ? 8'hC1 : M'(gf_mul(elem_t'(aj), elem_t'(bd), elem_t'(q), M));
      e_an = M'(gf_mul(elem_t'(aj), gf_xpow(W, elem_t'(q), M), elem_t'(q), M));
      checks += 2;
      if (pp !== e_pp) begin failures++; $display("FAIL pp aj=%h bd=%h q=%h pp=%h exp %h", aj, bd, q, pp, e_pp); end
      if (a_next !== e_an) begin failures++; $display("FAIL a_next aj=%h q=%h got %h exp %h", aj, q, a_next, e_an); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
