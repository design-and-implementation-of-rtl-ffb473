// fixed2float: converts a 33-bit 1.4.28 signed fixed-point word to IEEE-754
// single precision (1 sign, 8 exponent, 24-bit significand with hidden one).
// The magnitude is normalised on its leading one and the significand is
// truncated (round toward zero); zero maps to +0.  The result is registered:
// in_valid/din in cycle n give out_valid/dout in cycle n+1.  The two formats
// follow the design; the rounding mode and the one-cycle latency are this
// design's own choice.
module fixed2float
  import bcpnn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fx_t  din,
  output logic out_valid,
  output flt_t dout
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
  always_ff @(posedge clk) if (in_valid) dout <= fix2flt(din);
endmodule
