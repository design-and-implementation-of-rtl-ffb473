// float2fixed: converts an IEEE-754 single-precision word to the 33-bit 1.4.28
// signed fixed-point format of the datapath.  The significand is shifted by
// the unbiased exponent, truncated toward zero, and saturated to
// +/-(16 - 2^-28) when the magnitude does not fit; zero and denormals give 0.
// Registered: in_valid/din in cycle n give out_valid/dout in cycle n+1.  The
// formats follow the design; truncation, saturation and latency are this
// design's own choice.
module float2fixed
  import bcpnn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  flt_t din,
  output logic out_valid,
  output fx_t  dout
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
  always_ff @(posedge clk) if (in_valid) dout <= flt2fix(din);
endmodule
