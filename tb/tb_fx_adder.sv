// tb_fx_adder: random operands, checks S = A + B (33-bit wrap) one cycle later.
module tb_fx_adder;
  import bcpnn_pkg::*;
  logic clk = 0;
  fx_t a, b, s;
  int checks = 0, failures = 0;
  fx_adder dut (.clk, .a, .b, .s);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    longint la, lb, ls;
    fx_t exp_s;
    for (int n = 0; n < 500; n++) begin
      la = longint'($urandom) - 64'sd2147483648;
      lb = longint'($urandom) - 64'sd2147483648;
      if (n % 3 == 0) begin la = la * 2; lb = lb * 2; end   // reach overflow
      @(negedge clk);
      a = fx_t'(la); b = fx_t'(lb);
      ls = longint'(a) + longint'(b);
      exp_s = fx_t'(ls);
      @(posedge clk); #1;
      checks++;
      if (s !== exp_s) begin
        failures++;
        if (failures < 5) $display("adder mismatch %0d + %0d = %0d got %0d", a, b, exp_s, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
