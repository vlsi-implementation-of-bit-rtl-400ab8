// tb_gf_input_reg: self-checking test of the input register: load takes A
// and wins over adv, adv takes a_next, otherwise the register holds.
module tb_gf_input_reg;
  localparam int unsigned M = 8;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, adv = 1'b0;
  logic [M-1:0] a = '0, a_next = '0, aj, model = '0;
  int checks = 0, failures = 0;

  gf_input_reg #(.M(M)) dut (.clk, .rst_n, .load, .adv, .a, .a_next, .aj);

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
      load = ($urandom % 5) == 0;
      adv  = ($urandom % 2) == 0;
      a = M'($urandom); a_next = M'($urandom);
      @(negedge clk);
      if (load) model = a;
      else if (adv) model = a_next;
      checks++;
      if (aj !== model) begin
        failures++;
        $display("FAIL t=%0d aj=%h expected %h", t, aj, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
