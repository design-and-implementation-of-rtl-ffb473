// bias_log: the bias computation beta_j = ln(Pj + eps).
// The argument arrives already offset by epsilon (Pj_log, 1.4.28).  As in the
// design it is converted to single precision, passed through the logarithm
// unit and converted back to 1.4.28.  in_valid/pj_log in cycle n give
// out_valid/bias_j in cycle n+5.  Fully pipelined.
module bias_log
  import bcpnn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fx_t  pj_log,
  output logic out_valid,
  output fx_t  bias_j
);
  logic c_valid, l_valid;
  flt_t pj_f, log_f;
  fixed2float u_f2f (.clk, .rst_n, .in_valid, .din(pj_log), .out_valid(c_valid), .dout(pj_f));
  float_log   u_log (.clk, .rst_n, .in_valid(c_valid), .din(pj_f), .out_valid(l_valid), .dout(log_f));
  float2fixed u_fl2fx (.clk, .rst_n, .in_valid(l_valid), .din(log_f), .out_valid(out_valid), .dout(bias_j));
endmodule
