// tb_gf_xor_tree: self-checking test of the addition section: the output
// must be the XOR of all W inputs, for W = 8 (the default) and W = 5 (an
// unbalanced tree).
module tb_gf_xor_tree;
  localparam int unsigned M = 8;
  logic clk = 1'b0;
  logic [7:0][M-1:0] in8;
  logic [4:0][M-1:0] in5;
  logic [M-1:0] sum8, sum5, e8, e5;
  int checks = 0, failures = 0;

  gf_xor_tree #(.M(M), .W(8)) dut8 (.in(in8), .sum(sum8));
  gf_xor_tree #(.M(M), .W(5)) dut5 (.in(in5), .sum(sum5));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      e8 = '0; e5 = '0;
      for (int i = 0; i < 8; i++) begin
        in8[i] = (t < 64) ? ((i == t % 8) ? M'(1 << (t / 8)) : '0) : M'($urandom);
        e8 ^= in8[i];
      end
      for (int i = 0; i < 5; i++) begin
        in5[i] = M'($urandom);
        e5 ^= in5[i];
      end
      @(negedge clk);
      checks += 2;
      if (sum8 !== e8) begin failures++; $display("FAIL W=8 sum=%h expected %h", sum8, e8); end
      if (sum5 !== e5) begin failures++; $display("FAIL W=5 sum=%h expected %h", sum5, e5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
