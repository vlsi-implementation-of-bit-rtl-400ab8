// tb_gf_ffa: self-checking test of the finite field accumulator.
// Feeds random sequences of field elements and compares the accumulated
// value with the XOR of the sequence, including cycles with en low and a
// clear between sequences. The accumulator must lag its input by one clock.
module tb_gf_ffa;
  localparam int unsigned M = 8;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [M-1:0] d = '0, s, expect_s;
  int checks = 0, failures = 0;

  gf_ffa #(.M(M)) dut (.clk, .rst_n, .clr, .en, .d, .s);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (s !== expect_s) begin
      failures++;
      $display("FAIL %s: s=%h expected %h", what, s, expect_s);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    expect_s = '0;
    @(negedge clk);
    check("after reset");
    for (int seq = 0; seq < 50; seq++) begin
      clr = 1'b1; en = 1'b0; d = M'($urandom);
      @(negedge clk);
      clr = 1'b0; expect_s = '0;
      check("after clear");
      for (int n = 0; n < 1 + ($urandom % 12); n++) begin
        en = ($urandom % 4) != 0;
        d  = M'($urandom);
        @(negedge clk);
        if (en) expect_s ^= d;
        check("accumulate");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
