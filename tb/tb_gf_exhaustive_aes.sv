// tb_gf_exhaustive_aes: all 65,536 products of GF(2^8) with
// Q(x) = x^8 + x^4 + x^3 + x + 1, on both multipliers through gf_mult_top.
//
// The expected values come from logarithm/antilogarithm tables built at the
// start of the run from the generator 0x03: E(k) = 0x03^k, L(E(k)) = k, and
// for nonzero a, b: a * b = E((L(a) + L(b)) mod 255). The tables are first
// checked on the known example L(0x57) = 0x62, L(0x83) = 0x50,
// 0x62 + 0x50 = 0xB2 and E(0xB2) = 0xC1 = 0x57 * 0x83. Each product also has
// its latency checked (9 cycles bit-serial, 2 cycles digit-serial).
module tb_gf_exhaustive_aes;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bsp_start = 1'b0, bsp_en = 1'b1, dsp_start = 1'b0, dsp_en = 1'b1;
  logic [7:0] bsp_a = '0, bsp_b = '0, bsp_p = 8'h1B, dsp_a = '0, dsp_b = '0, dsp_q = 8'h1B;
  logic [7:0] bsp_prod, dsp_prod;
  logic bsp_busy, bsp_done, dsp_busy, dsp_done;
  logic [7:0] exp_t [256];
  logic [7:0] log_t [256];
  int checks = 0, failures = 0;

  gf_mult_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // x * 0x03 = x * x XOR x, reduced with 0x1B
  function automatic logic [7:0] times3(logic [7:0] x);
    logic [7:0] x2 = {x[6:0], 1'b0} ^ (x[7] ? 8'h1B : 8'h00);
    return x2 ^ x;
  endfunction

  function automatic logic [7:0] tbl_mul(logic [7:0] a, logic [7:0] b);
    if (a == 0 || b == 0) return 8'h00;
    return exp_t[(int'(log_t[a]) + int'(log_t[b])) % 255];
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [7:0] e;
    int lat_b, lat_d;
    exp_t[0] = 8'h01;
    for (int k = 1; k < 256; k++) exp_t[k] = times3(exp_t[k-1]);
    log_t[0] = 8'h00;
    for (int k = 0; k < 255; k++) log_t[exp_t[k]] = 8'(k);
    chk(log_t[8'h57] == 8'h62, "L(0x57) = 0x62");
    chk(log_t[8'h83] == 8'h50, "L(0x83) = 0x50");
    chk(exp_t[8'hB2] == 8'hC1, "E(0xB2) = 0xC1");
    chk(tbl_mul(8'h57, 8'h83) == 8'hC1, "0x57 * 0x83 by tables");

    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 65536; i++) begin
      bsp_a = 8'(i); bsp_b = 8'(i >> 8); dsp_a = bsp_a; dsp_b = bsp_b;
      e = tbl_mul(bsp_a, bsp_b);
      bsp_start = 1'b1; dsp_start = 1'b1;
      @(negedge clk);
      bsp_start = 1'b0; dsp_start = 1'b0;
      lat_b = -1; lat_d = -1;
      for (int c = 1; c <= 12 && lat_b < 0; c++) begin
        @(negedge clk);
        if (dsp_done && lat_d < 0) lat_d = c;
        if (bsp_done) lat_b = c;
      end
      chk(bsp_prod == e && lat_b == 8, $sformatf("bsp %h*%h = %h (exp %h), latency %0d",
          8'(i), 8'(i >> 8), bsp_prod, e, lat_b));
      chk(dsp_prod == e && lat_d == 1, $sformatf("dsp %h*%h = %h (exp %h), latency %0d",
          8'(i), 8'(i >> 8), dsp_prod, e, lat_d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
