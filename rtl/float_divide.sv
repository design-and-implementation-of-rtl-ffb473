// float_divide: single-precision division a / b for the weight computation.
// The sign is the XOR of the operand signs, the exponent the difference of the
// exponents, and the significand the 48-by-24-bit quotient of the two
// significands, normalised by one place when below one and truncated.  a = 0
// gives 0; b = 0 gives the largest finite number with the quotient's sign (the
// datapath never divides by zero because every divisor includes epsilon).
// Denormals, infinities and NaN are not handled.  Registered: in_valid with the
// operands in cycle n give out_valid/q in cycle n+1.  The divider's place in
// the weight path follows the design; its insides are this design's own.
module float_divide
  import bcpnn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  flt_t a,
  input  flt_t b,
  output logic out_valid,
  output flt_t q
);
  function automatic flt_t fdiv(flt_t x, flt_t y);
    logic        s;
    int          e;
    logic [47:0] num;
    logic [47:0] quo;
    s = x[31] ^ y[31];
    if (x[30:23] == 8'd0) return '0;
    if (y[30:23] == 8'd0) return {s, 8'hFE, 23'h7FFFFF};
    num = {1'b1, x[22:0], 24'd0};
    quo = num / {24'd0, 1'b1, y[22:0]};       // in (2^23, 2^25)
    e   = int'(x[30:23]) - int'(y[30:23]) + 127;
    if (quo[24]) begin
      if (e >= 255) return {s, 8'hFE, 23'h7FFFFF};
      if (e <= 0)   return '0;
      return {s, 8'(e), quo[23:1]};
    end else begin
      if (e - 1 >= 255) return {s, 8'hFE, 23'h7FFFFF};
      if (e - 1 <= 0)   return '0;
      return {s, 8'(e - 1), quo[22:0]};
    end
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
  always_ff @(posedge clk) if (in_valid) q <= fdiv(a, b);
endmodule
