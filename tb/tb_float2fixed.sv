// tb_float2fixed: random single-precision values in (-16, 16), tiny values,
// zero and out-of-range values; the 1.4.28 result must equal the value
// truncated toward zero (within one LSB) or the saturation limit, one cycle
// after in_valid.
module tb_float2fixed;
  import bcpnn_pkg::*;
  import bcpnn_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  flt_t din;
  fx_t dout;
  int checks = 0, failures = 0;
  float2fixed dut (.clk, .rst_n, .in_valid, .din, .out_valid, .dout);
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
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      case (n)
        0: x = 0.0;
        1: x = 100.0;
        2: x = -100.0;
        3: x = 1.0e-12;
        default: x = (real'($urandom_range(0, 2000000)) - 1000000.0) / 62500.0;
      endcase
      din = r2f(x);
      x = f2r(din);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      want = x >= 16.0 ? 16.0 - 1.0 / 268435456.0 : x <= -16.0 ? -16.0 + 1.0 / 268435456.0 : x;
      got = fx2real(dout);
      checks++;
      if (!out_valid || absr(got - want) > 1.0 / 268435456.0 * 1.01) begin
        failures++;
        if (failures < 5) $display("fl2fx %g -> %g", x, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
