// float_log: natural logarithm of a positive single-precision number.
// With x = 2^e * (1 + f), ln x = e * ln 2 + ln(1 + f).  ln(1 + f) comes from a
// 257-entry table of ln(1 + k/256) (1.4.28, computed at start-up) indexed by the
// top 8 fraction bits, linearly interpolated with the remaining 15 bits (error
// below 2e-6).  The sum is formed in 64-bit fixed point with 28 fraction bits
// and converted back to single precision.  Zero or negative inputs give the
// most negative finite number.  Three register stages: in_valid/din in cycle n
// give out_valid/dout in cycle n+3.  That the logarithm is taken in floating
// point follows the design; the table-and-interpolation method is this
// design's own.
module float_log
  import bcpnn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  flt_t din,
  output logic out_valid,
  output flt_t dout
);
  localparam longint LN2_FX = 64'd186065279;  // round(ln 2 * 2^28)

  logic signed [31:0] ln_tab [257];
  initial begin
    for (int k = 0; k <= 256; k++)
      ln_tab[k] = 32'($rtoi($ln(1.0 + real'(k) / 256.0) * 268435456.0 + 0.5));
  end

  logic [2:0]          v;
  logic                bad1, bad2;
  logic signed [31:0]  t0, t1;
  logic [14:0]         r1;
  logic signed [63:0]  e1, base2, frac2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[1:0], in_valid};
  end
  assign out_valid = v[2];

  always_ff @(posedge clk) begin
    // stage 1: table read
    t0   <= ln_tab[9'(din[22:15])];
    t1   <= ln_tab[9'(din[22:15]) + 9'd1];
    r1   <= din[14:0];
    e1   <= 64'(signed'(int'(din[30:23]) - 127));
    bad1 <= din[31] || (din[30:23] == 8'd0);
    // stage 2: interpolation and exponent term
    frac2 <= 64'(t0) + ((64'(t1 - t0) * 64'(r1)) >>> 15);
    base2 <= e1 * LN2_FX;
    bad2  <= bad1;
    // stage 3: sum and conversion
    dout  <= bad2 ? 32'hFF7F_FFFF : wide2flt(base2 + frac2);
  end
endmodule
