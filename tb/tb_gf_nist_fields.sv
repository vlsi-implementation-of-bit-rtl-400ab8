// tb_gf_nist_fields: both multipliers at the sizes of the two NIST binary
// fields generated by trinomials, Q(z) = z^233 + z^73 + 1 and
// Q(z) = z^409 + z^87 + 1, digit size 8 for the digit-serial multiplier.
// Each instance runs random products checked against the reference model,
// with latency checks (M+1 or ceil(M/8)+1 cycles per product plus stalls).
module tb_gf_nist_fields;
  logic clk = 1'b0, rst_n = 1'b0;
  int c[4], f[4], s[4];
  logic fin[4];
  int checks = 0, failures = 0;

  localparam logic [232:0] Q233 = (233'(1) << 73) | 233'(1);
  localparam logic [408:0] Q409 = (409'(1) << 87) | 409'(1);

  tb_gf_mult_driver #(.M(233), .W(8), .DIGITAL(1'b0), .NTESTS(10), .Q(Q233))
    u_bsp233 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .stalls_seen(s[0]), .finished(fin[0]));
  tb_gf_mult_driver #(.M(233), .W(8), .DIGITAL(1'b1), .NTESTS(30), .Q(Q233))
    u_dsp233 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .stalls_seen(s[1]), .finished(fin[1]));
  tb_gf_mult_driver #(.M(409), .W(8), .DIGITAL(1'b0), .NTESTS(6), .Q(Q409))
    u_bsp409 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .stalls_seen(s[2]), .finished(fin[2]));
  tb_gf_mult_driver #(.M(409), .W(8), .DIGITAL(1'b1), .NTESTS(20), .Q(Q409))
    u_dsp409 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .stalls_seen(s[3]), .finished(fin[3]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    for (int i = 0; i < 4; i++) begin
      checks += c[i]; failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
