// float_exp: natural exponential of a single-precision number for the MCU
// activation exp(gamma_m * m_j).
// exp(x) = 2^y with y = x * log2(e); y is split into its integer part n and
// fraction f in [0,1).  2^f comes from a 257-entry table of 2^(k/256) (the
// exp_oj block memory, computed at start-up) indexed by the top 8 bits of f and
// linearly interpolated with the next 20 bits; since 2^f lies in [1,2) it is
// directly the significand of the result, whose exponent is n + 127.  Results
// below the normal range give 0, above it the largest finite number.  Inputs
// are limited to |x| < 16 by the fixed-point stage (larger ones saturate).
// The sign bit of dout is always 0, as an exponential is never negative.
// Three register stages: in_valid/din in cycle n give out_valid/dout in
// cycle n+3.  A block memory for
// the activation exponential follows the design; the base-2 table method is
// this design's own.
module float_exp
  import bcpnn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  flt_t din,
  output logic out_valid,
  output flt_t dout
);
  localparam longint LOG2E_FX = 64'd387270501;  // round(log2(e) * 2^28)

  logic [31:0] p2_tab [257];
  initial begin
    for (int k = 0; k <= 256; k++)
      p2_tab[k] = 32'($rtoi($pow(2.0, real'(k) / 256.0) * 268435456.0 + 0.5));
  end

  logic [2:0]          v;
  logic signed [63:0]  y1;
  logic [31:0]         t0, t1;
  logic [19:0]         r2;
  logic signed [63:0]  n2;
  logic signed [63:0]  yprod;
  logic [63:0]         mant3;

  assign yprod = (64'(flt2fix(din)) * LOG2E_FX) >>> FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[1:0], in_valid};
  end
  assign out_valid = v[2];

  always_ff @(posedge clk) begin
    // stage 1: y = x * log2(e) in 28-fraction-bit fixed point
    y1 <= yprod;
    // stage 2: split and table read
    n2 <= y1 >>> FRAC;
    t0 <= p2_tab[9'(y1[27:20])];
    t1 <= p2_tab[9'(y1[27:20]) + 9'd1];
    r2 <= y1[19:0];
  end

  // stage 3: interpolate 2^f (1.28) and assemble the float
  assign mant3 = 64'(t0) + ((64'(t1 - t0) * 64'(r2)) >> 20);
  always_ff @(posedge clk) begin
    if (n2 + 127 <= 0)        dout <= '0;
    else if (n2 + 127 >= 255) dout <= 32'h7F7F_FFFF;
    else if (mant3[29])       dout <= {1'b0, 8'(n2 + 128), 23'd0};  // 2^f rounded up to 2.0
    else                      dout <= {1'b0, 8'(n2 + 127), mant3[27:5]};
  end
endmodule
