// tb_fx_multiplier: random 1.4.28 operands streamed every cycle; each product
// must appear exactly three cycles later and equal floor(a*b) to within one
// least significant bit, computed in real arithmetic.
module tb_fx_multiplier;
  import bcpnn_pkg::*;
  logic clk = 0;
  fx_t a, b, p;
  int checks = 0, failures = 0;
  real ra [$], rb [$];
  fx_multiplier dut (.clk, .a, .b, .p);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    real exp_r, got_r;
    a = '0; b = '0;
    for (int n = 0; n < 400 + 3; n++) begin
      @(negedge clk);
      if (n >= 3) begin
        exp_r = ra[n-3] * rb[n-3];
        got_r = fx2real(p);
        checks++;
        if (got_r > exp_r + 1e-12 || got_r < exp_r - 2.0 / 268435456.0) begin
          failures++;
          if (failures < 5) $display("mul %f*%f exp %f got %f", ra[n-3], rb[n-3], exp_r, got_r);
        end
      end
      a = fx_t'(longint'($urandom >> 2) - 64'sd536870912);   // within +/-2
      b = fx_t'(longint'($urandom >> 1) - 64'sd1073741824);  // within +/-4
      if (n % 4 == 0) b = fx_t'(longint'($urandom_range(0, 268435456)));
      ra.push_back(fx2real(a));
      rb.push_back(fx2real(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
