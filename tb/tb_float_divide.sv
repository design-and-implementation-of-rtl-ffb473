// tb_float_divide: random signed quotients over many orders of magnitude plus
// a zero dividend; the result must match a/b to within two units of the 24th
// significant bit, one cycle after in_valid.
module tb_float_divide;
  import bcpnn_pkg::*;
  import bcpnn_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  flt_t a, b, q;
  int checks = 0, failures = 0;
  float_divide dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .q);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    real x, y, want, got;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      x = real'($urandom_range(1, 1000000)) * $pow(10.0, real'($urandom_range(0, 8)) - 6.0);
      y = real'($urandom_range(1, 1000000)) * $pow(10.0, real'($urandom_range(0, 8)) - 6.0);
      if (n % 3 == 1) x = -x;
      if (n % 5 == 2) y = -y;
      if (n == 0) x = 0.0;
      a = r2f(x);
      b = r2f(y);
      x = f2r(a);
      y = f2r(b);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      want = x / y;
      got = f2r(q);
      checks++;
      if (!out_valid || absr(got - want) > absr(want) * 2.4e-7) begin
        failures++;
        if (failures < 5) $display("div %g / %g = %g got %g", x, y, want, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
