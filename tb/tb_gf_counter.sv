// tb_gf_counter: self-checking test of the step counter: counts only while
// en is high, clears synchronously, wraps at 2^WIDTH.
module tb_gf_counter;
  localparam int unsigned WIDTH = 4;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [WIDTH-1:0] count;
  int model = 0;
  int checks = 0, failures = 0;

  gf_counter #(.WIDTH(WIDTH)) dut (.clk, .rst_n, .clr, .en, .count);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      clr = ($urandom % 40) == 0;
      en  = ($urandom % 3) != 0;
      @(negedge clk);
      if (clr) model = 0;
      else if (en) model = (model + 1) % (1 << WIDTH);
      checks++;
      if (int'(count) != model) begin
        failures++;
        $display("FAIL t=%0d count=%0d expected %0d", t, count, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
