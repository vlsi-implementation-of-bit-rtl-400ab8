// tb_gf_mru: self-checking test of the modular reduction unit.
// Loads random operands and checks that after j shifts the register holds
// x^j * A mod Q(x), computed by the reference long division, for the default
// polynomial x^8+x^4+x^3+x+1 and random polynomials with q_0 = 1. Also
// checks that the register holds when neither load nor shift is asserted.
module tb_gf_mru;
  import tb_gf_ref_pkg::*;
  localparam int unsigned M = 8;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0;
  logic [M-1:0] a = '0, q = 8'h1B, r;
  int checks = 0, failures = 0;

  gf_mru #(.M(M)) dut (.clk, .rst_n, .load, .shift, .a, .q, .r);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] exp_r;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      q = (t < 50) ? 8'h1B : (M'($urandom) | 8'h01);
      a = M'($urandom);
      load = 1'b1; shift = 1'b1;   // load must win
      @(negedge clk);
      load = 1'b0;
      for (int j = 0; j <= M; j++) begin
        exp_r = M'(gf_mul(elem_t'(a), gf_xpow(j, elem_t'(q), M), elem_t'(q), M));
        checks++;
        if (r !== exp_r) begin
          failures++;
          $display("FAIL q=%h a=%h j=%0d r=%h expected %h", q, a, j, r, exp_r);
        end
        shift = ($urandom % 3) != 0;
        if (!shift) begin
          @(negedge clk);
          checks++;
          if (r !== exp_r) begin
            failures++;
            $display("FAIL hold q=%h a=%h j=%0d", q, a, j);
          end
          shift = 1'b1;
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
