// tb_gf_piso: self-checking test of the parallel-in serial-out register,
// both as a bit stream (D = 1) and as a digit stream (N = 16, D = 8).
// Each loaded word must come out least significant bit/digit first, hold
// while shift is low, and fill with zeros.
module tb_gf_piso;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0;
  logic [7:0]  pl1 = '0, shreg1;
  logic        sout1;
  logic [15:0] pl8 = '0, shreg8;
  logic [7:0]  sout8;
  int checks = 0, failures = 0;

  gf_piso #(.N(8),  .D(1)) dut1 (.clk, .rst_n, .load, .shift, .pl(pl1), .sout(sout1), .shreg(shreg1));
  gf_piso #(.N(16), .D(8)) dut8 (.clk, .rst_n, .load, .shift, .pl(pl8), .sout(sout8), .shreg(shreg8));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [7:0] w1;
    logic [15:0] w8;
    int step;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 100; t++) begin
      w1 = (t == 0) ? 8'h57 : 8'($urandom);
      w8 = 16'($urandom);
      pl1 = w1; pl8 = w8;
      load = 1'b1; shift = 1'b1;
      @(negedge clk);
      load = 1'b0;
      chk(shreg1 == w1 && shreg8 == w8, "load");
      step = 0;
      while (step < 9) begin
        shift = ($urandom % 4) != 0;
        chk(sout1 == ((step < 8) ? w1[step] : 1'b0), "bit stream");
        chk(sout8 == ((step < 2) ? w8[8*step +: 8] : 8'h00), "digit stream");
        chk(shreg1 == (w1 >> step), "shreg bit");
        @(negedge clk);
        if (shift) step++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
