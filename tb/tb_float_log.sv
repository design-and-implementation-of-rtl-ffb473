// tb_float_log: a stream of positive single-precision values from 1e-6 to
// 1e4 (one per cycle); ln must be within 3e-6 absolute (plus single-precision
// rounding) of $ln, three cycles after each input.
module tb_float_log;
  import bcpnn_pkg::*;
  import bcpnn_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  flt_t din, dout;
  int checks = 0, failures = 0;
  real xs [$];
  float_log dut (.clk, .rst_n, .in_valid, .din, .out_valid, .dout);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    real x, want, got;
    int got_n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    got_n = 0;
    for (int n = 0; n < 403; n++) begin
      @(negedge clk);
      if (n >= 3) begin
        want = $ln(xs[n-3]);
        got = f2r(dout);
        checks++;
        if (!out_valid || absr(got - want) > 3e-6 + absr(want) * 1.2e-7) begin
          failures++;
          if (failures < 5) $display("ln %g = %g got %g", xs[n-3], want, got);
        end
      end
      x = real'($urandom_range(1, 1000000)) * $pow(10.0, real'($urandom_range(0, 4)) - 6.0);
      if (n == 0) x = 1.0;
      din = r2f(x);
      xs.push_back(f2r(din));
      in_valid = (n < 400);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
