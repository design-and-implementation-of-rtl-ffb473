// fx_multiplier: signed fixed-point multiplier (Mul_1 / Mul_2).
// Both operands are 33-bit signed 1.4.28 words.  The full 66-bit product is
// 8.56; bits 60 down to 28 are kept, which is the 1.4.28 result with the low
// fraction bits truncated and the top bits dropped (no saturation).  Three
// register stages (operands, product, truncated result): operands applied in
// cycle n give P in cycle n+3.  The bit selection and the three stages follow
// the multiplier configuration of the design.
module fx_multiplier
  import bcpnn_pkg::*;
(
  input  logic clk,
  input  fx_t  a,
  input  fx_t  b,
  output fx_t  p
);
  fx_t                 a_q, b_q;
  logic signed [65:0]  prod_q;
  always_ff @(posedge clk) begin
    a_q    <= a;
    b_q    <= b;
    prod_q <= 66'(a_q) * 66'(b_q);
    p      <= prod_q[60:28];
  end
endmodule
