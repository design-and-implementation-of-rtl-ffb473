// tb_float_exp: a stream of single-precision arguments in (-12, 3); exp must
// be within 2e-6 relative of $exp, three cycles after each input.  Also checks
// that an argument below -16 is clamped to -16 by the fixed-point stage.
module tb_float_exp;
  import bcpnn_pkg::*;
  import bcpnn_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  flt_t din, dout;
  int checks = 0, failures = 0;
  real xs [$];
  float_exp dut (.clk, .rst_n, .in_valid, .din, .out_valid, .dout);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    real x, want, got;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 403; n++) begin
      @(negedge clk);
      if (n >= 3) begin
        want = $exp(xs[n-3] < -16.0 ? -16.0 + 1.0 / 268435456.0 : xs[n-3]);
        got = f2r(dout);
        checks++;
        if (!out_valid || absr(got - want) > want * 2e-6 + 1e-30) begin
          failures++;
          if (failures < 5) $display("exp %g = %g got %g", xs[n-3], want, got);
        end
      end
      x = (real'($urandom_range(0, 1500000)) - 1200000.0) / 100000.0;
      if (n == 0) x = 0.0;
      if (n == 1) x = 2.0;
      if (n == 2) x = -30.0;
      din = r2f(x);
      xs.push_back(f2r(din));
      in_valid = (n < 400);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
