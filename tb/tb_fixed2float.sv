// tb_fixed2float: random and boundary 1.4.28 values; the single-precision
// result, read back with f2r, must match the fixed value to within
// one unit in the 24th significant bit, one cycle after in_valid.
module tb_fixed2float;
  import bcpnn_pkg::*;
  import bcpnn_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  fx_t din;
  flt_t dout;
  int checks = 0, failures = 0;
  fixed2float dut (.clk, .rst_n, .in_valid, .din, .out_valid, .dout);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    real x, y;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      case (n)
        0: din = '0;
        1: din = 33'sd1;
        2: din = FX_ONE;
        3: din = -FX_ONE;
        4: din = {1'b0, {32{1'b1}}};
        default: din = fx_t'(longint'($urandom) - 64'sd2147483648) >>> $urandom_range(0, 20);
      endcase
      x = fx2real(din);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      y = f2r(dout);
      checks++;
      if (!out_valid || absr(y - x) > absr(x) * 1.2e-7) begin
        failures++;
        if (failures < 5) $display("f2f %g -> %g", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
