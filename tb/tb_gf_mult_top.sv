// tb_gf_mult_top: end-to-end test of gf_mult_top at its default size
// (GF(2^8), digit size 8).
//
// Both multipliers get the same operand stream: first the worked example
// 0x83 * 0x57 = 0xC1 under x^8+x^4+x^3+x+1, then random operands under that
// and other degree-8 polynomials. Every product is compared with the
// reference model and every latency with M+1 (bit-serial) or ceil(M/W)+1
// (digit-serial) cycles plus stalled cycles. The mechanisms of the design are
// each made to happen and counted, and one that never happens is a failure:
//   * stall       - en low while an operation is running,
//   * restart     - start while busy, which abandons the old operation,
//   * back-to-back- a new start the cycle after done, so the accumulator is
//                   cleared between successive field operations,
//   * hold        - prod kept unchanged while idle after done.
module tb_gf_mult_top;
  import tb_gf_ref_pkg::*;
  localparam int unsigned M = gf_pkg::GF_M;
  localparam int unsigned W = gf_pkg::GF_W;
  localparam int unsigned NDIG = (M + W - 1) / W;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bsp_start = 1'b0, bsp_en = 1'b0, dsp_start = 1'b0, dsp_en = 1'b0;
  logic [M-1:0] bsp_a = '0, bsp_b = '0, bsp_p = '0, dsp_a = '0, dsp_b = '0, dsp_q = '0;
  logic [M-1:0] bsp_prod, dsp_prod;
  logic bsp_busy, bsp_done, dsp_busy, dsp_done;

  int checks = 0, failures = 0;
  int n_stall = 0, n_restart = 0, n_b2b = 0, n_hold = 0;

  gf_mult_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  // Start both multipliers on (ta, tb, tq) and follow them to done.
  // mode 0: en high throughout; 1: random stalls; 2: restart after a few
  // cycles with new operands; 3: start again immediately after done.
  task automatic op(logic [M-1:0] ta, logic [M-1:0] tb, logic [M-1:0] tq, int mode,
                    logic [M-1:0] expect_p, output logic [M-1:0] got_b, output logic [M-1:0] got_d);
    int cyc = 0, st_b = 0, st_d = 0, done_b = -1, done_d = -1;
    logic [M-1:0] e = expect_p;
    bsp_a = ta; bsp_b = tb; bsp_p = tq; dsp_a = ta; dsp_b = tb; dsp_q = tq;
    bsp_start = 1'b1; dsp_start = 1'b1; bsp_en = 1'b1; dsp_en = 1'b1;
    @(negedge clk);
    bsp_start = 1'b0; dsp_start = 1'b0;
    if (mode == 2) begin
      // run a little, then restart with new operands on both
      repeat (1) @(negedge clk);
      chk(bsp_busy, "bsp busy before restart");
      ta = M'($urandom); tb = M'($urandom);
      e = M'(gf_mul(elem_t'(ta), elem_t'(tb), elem_t'(tq), M));
      bsp_a = ta; bsp_b = tb; dsp_a = ta; dsp_b = tb;
      bsp_start = 1'b1; dsp_start = 1'b1;
      if (bsp_busy) n_restart++;
      @(negedge clk);
      bsp_start = 1'b0; dsp_start = 1'b0;
    end
    bsp_a = M'($urandom); bsp_b = M'($urandom); dsp_a = M'($urandom); dsp_b = M'($urandom);
    while ((done_b < 0 || done_d < 0) && cyc < 10 * M) begin
      if (mode == 1) begin
        bsp_en = ($urandom % 3) != 0;
        dsp_en = ($urandom % 2) != 0;
      end
      if (!bsp_en && bsp_busy) begin st_b++; n_stall++; end
      if (!dsp_en && dsp_busy) begin st_d++; n_stall++; end
      @(negedge clk);
      cyc++;
      if (bsp_done && done_b < 0) done_b = cyc;
      if (dsp_done && done_d < 0) done_d = cyc;
      if (done_b >= 0) bsp_en = 1'b1;
      if (done_d >= 0) dsp_en = 1'b1;
    end
    chk(done_b == int'(M) + st_b, $sformatf("bsp latency %0d, %0d stalls", done_b, st_b));
    chk(done_d == int'(NDIG) + st_d, $sformatf("dsp latency %0d, %0d stalls", done_d, st_d));
    chk(bsp_prod == e, $sformatf("bsp product %h expected %h", bsp_prod, e));
    chk(dsp_prod == e, $sformatf("dsp product %h expected %h", dsp_prod, e));
    got_b = bsp_prod; got_d = dsp_prod;
  endtask

  initial begin
    logic [M-1:0] ta, tb, tq, gb, gd;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    op(8'h83, 8'h57, gf_pkg::GF_Q_DEFAULT, 0, 8'hC1, gb, gd);
    // prod holds while idle
    repeat (5) @(negedge clk);
    chk(bsp_prod == 8'hC1 && dsp_prod == 8'hC1 && !bsp_busy && !dsp_busy, "hold while idle");
    n_hold++;
    for (int t = 0; t < 400; t++) begin
      tq = (t % 2) ? gf_pkg::GF_Q_DEFAULT : (M'($urandom) | M'(1));
      ta = M'($urandom); tb = M'($urandom);
      // mode 3: this op starts the cycle after the previous done
      if (t % 4 == 3) n_b2b++;
      op(ta, tb, tq, t % 4 == 3 ? 0 : t % 3,
         M'(gf_mul(elem_t'(ta), elem_t'(tb), elem_t'(tq), M)), gb, gd);
      if (t % 4 == 2) begin
        repeat (3) @(negedge clk);
        chk(bsp_prod == gb && dsp_prod == gd, "hold while idle");
        n_hold++;
      end
    end
    $display("mechanisms: stall=%0d restart=%0d back_to_back=%0d hold=%0d",
             n_stall, n_restart, n_b2b, n_hold);
    checks += 4;
    if (n_stall == 0)   begin failures++; $display("FAIL stall never exercised"); end
    if (n_restart == 0) begin failures++; $display("FAIL restart never exercised"); end
    if (n_b2b == 0)     begin failures++; $display("FAIL back-to-back never exercised"); end
    if (n_hold == 0)    begin failures++; $display("FAIL hold never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
