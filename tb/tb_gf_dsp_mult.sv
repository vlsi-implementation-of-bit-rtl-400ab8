// tb_gf_dsp_mult: self-checking test of the digit-serial/parallel multiplier.
// A second instance at M = 13, W = 4 runs four-digit products so that the
// input register update z^W * A^j and the digit shifting are exercised.
// Runs the worked example 0x57 * 0x83 = 0xC1 in GF(2^8) with
// Q(x) = x^8+x^4+x^3+x+1, then random products under several degree-8
// polynomials, compared with the reference long-division product. Checks
// the latency (done ceil(M/W)+1 cycles after start with en high), that en low
// stretches it by exactly the stalled cycles, that busy is high throughout,
// and that prod holds after done.
module tb_gf_dsp_mult;
  import tb_gf_ref_pkg::*;
  localparam int unsigned M = 8;
  localparam int unsigned W = 8;
  localparam int unsigned N = (M + W - 1) / W;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, en = 1'b0;
  logic [M-1:0] a = '0, b = '0, p = 8'h1B, prod;
  logic busy, done;
  int checks = 0, failures = 0;

  gf_dsp_mult #(.M(M), .W(W)) dut (.clk, .rst_n, .start, .en, .a, .b, .q(p), .prod, .busy, .done);

  // Multi-digit configuration: M = 13, W = 4 gives four digits per product,
  // Q(z) = z^13 + z^4 + z^3 + z + 1.
  int c2, f2, s2;
  logic fin2;
  tb_gf_mult_driver #(.M(13), .W(4), .DIGITAL(1'b1), .NTESTS(200), .Q(13'h001B))
    u_multi (.clk, .rst_n, .checks(c2), .failures(f2), .stalls_seen(s2), .finished(fin2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a=%h b=%h p=%h prod=%h", what, a, b, p, prod);
    end
  endtask

  // One multiplication; stall_pct is the chance (in %) of en low per cycle.
  task automatic run(logic [M-1:0] ta, logic [M-1:0] tb, logic [M-1:0] tp,
                     int stall_pct, logic [M-1:0] expect_p);
    int cycles = 0, stalls = 0;
    a = ta; b = tb; p = tp;
    start = 1'b1; en = 1'b1;
    @(negedge clk);
    start = 1'b0;
    a = M'($urandom); b = M'($urandom);   // operands are captured at start
    while (!done) begin
      chk(busy, "busy while running");
      en = ($urandom % 100) >= stall_pct;
      if (!en) stalls++;
      @(negedge clk);
      cycles++;
      if (cycles > 10 * M + 10) break;
    end
    chk(prod == expect_p, "product");
    chk(cycles == N + stalls, "latency");
    chk(!busy, "idle after done");
    en = 1'b1;
    @(negedge clk);
    chk(!done && prod == expect_p, "done is a pulse, prod holds");
  endtask

  initial begin
    logic [M-1:0] ta, tb, tp;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(8'h83, 8'h57, 8'h1B, 0, 8'hC1);
    run(8'h57, 8'h83, 8'h1B, 30, 8'hC1);
    for (int t = 0; t < 300; t++) begin
      tp = (t % 3 == 0) ? 8'h1B : (t % 3 == 1) ? 8'h1D : (M'($urandom) | 8'h01);
      ta = M'($urandom); tb = M'($urandom);
      run(ta, tb, tp, (t % 2) ? 25 : 0,
          M'(gf_mul(elem_t'(ta), elem_t'(tb), elem_t'(tp), M)));
    end
    wait (fin2);
    checks += c2; failures += f2;
    checks++;
    if (s2 == 0) begin failures++; $display("FAIL no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
