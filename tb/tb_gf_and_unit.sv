// tb_gf_and_unit: self-checking test of the AND unit: c must equal a when
// b = 1 and zero when b = 0, for exhaustive 8-bit a.
module tb_gf_and_unit;
  localparam int unsigned M = 8;
  logic clk = 1'b0;
  logic [M-1:0] a, c;
  logic b;
  int checks = 0, failures = 0;

  gf_and_unit #(.M(M)) dut (.a, .b, .c);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      a = M'(i);
      b = i[8];
      @(negedge clk);
      checks++;
      if (c !== (b ? M'(i) : '0)) begin
        failures++;
        $display("FAIL a=%h b=%b c=%h", a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
