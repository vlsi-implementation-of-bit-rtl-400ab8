// tb_gf_reduction_section: self-checking test of the reduction section:
// za[i] must equal z^i * A mod Q(z) for i = 0..W, checked against the
// reference product for random A and polynomials with q_0 = 1.
module tb_gf_reduction_section;
  import tb_gf_ref_pkg::*;
  localparam int unsigned M = 8;
  localparam int unsigned W = 8;
  logic clk = 1'b0;
  logic [M-1:0] a, q;
  logic [W:0][M-1:0] za;
  int checks = 0, failures = 0;

  gf_reduction_section #(.M(M), .W(W)) dut (.a, .q, .za);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] e;
    for (int t = 0; t < 300; t++) begin
      a = M'($urandom);
      q = (t % 2) ? 8'h1B : (M'($urandom) | 8'h01);
      @(negedge clk);
      for (int i = 0; i <= W; i++) begin
        e = M'(gf_mul(elem_t'(a), gf_xpow(i, elem_t'(q), M), elem_t'(q), M));
        checks++;
        if (za[i] !== e) begin
          failures++;
          $display("FAIL a=%h q=%h i=%0d za=%h expected %h", a, q, i, za[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
