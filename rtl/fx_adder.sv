// fx_adder: signed adder of the datapath (Add_1 / Add_2 of each update module).
// S = A + B on 33-bit signed 1.4.28 operands, 33-bit result that wraps on
// overflow, registered once: the sum of operands applied in cycle n appears in
// cycle n+1.  Width, signedness, add-only mode and latency 1 follow the adder
// configuration of the design; subtraction is done by the caller negating B.
module fx_adder
  import bcpnn_pkg::*;
(
  input  logic clk,
  input  fx_t  a,
  input  fx_t  b,
  output fx_t  s
);
  always_ff @(posedge clk) s <= a + b;
endmodule
