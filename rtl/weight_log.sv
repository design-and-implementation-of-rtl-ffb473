// weight_log: the weight computation w_ij = ln((Pij + eps^2) / ((Pi + eps)(Pj + eps))).
// The three arguments arrive already offset by epsilon (Pi_log, Pj_log,
// Pij_log, 1.4.28).  The chain is the design's: a fixed-point multiplier forms
// the denominator, two fixed2float units convert numerator and denominator,
// float_divide divides, float_log takes the logarithm and float2fixed returns
// the 1.4.28 weight.  in_valid with the three operands in cycle n gives
// out_valid with wij in cycle n+9 (3 multiply, 1 convert, 1 divide, 3 log,
// 1 convert).  The unit is fully pipelined and accepts a new operand set every
// cycle.  Weights below -16 saturate.
module weight_log
  import bcpnn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fx_t  pi_log,
  input  fx_t  pj_log,
  input  fx_t  pij_log,
  output logic out_valid,
  output fx_t  wij
);
  fx_t  den_fx;
  fx_t  num_d [3];
  logic [2:0] v_d;

  fx_multiplier u_mul (.clk, .a(pi_log), .b(pj_log), .p(den_fx));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_d <= '0;
    else        v_d <= {v_d[1:0], in_valid};
  end
  always_ff @(posedge clk) begin
    num_d[0] <= pij_log;
    num_d[1] <= num_d[0];
    num_d[2] <= num_d[1];
  end

  logic c_valid, c_valid2, d_valid, l_valid;
  flt_t num_f, den_f, quo_f, log_f;

  fixed2float u_f2f_num (.clk, .rst_n, .in_valid(v_d[2]), .din(num_d[2]), .out_valid(c_valid),  .dout(num_f));
  fixed2float u_f2f_den (.clk, .rst_n, .in_valid(v_d[2]), .din(den_fx),   .out_valid(c_valid2), .dout(den_f));
  float_divide u_div (.clk, .rst_n, .in_valid(c_valid & c_valid2), .a(num_f), .b(den_f),
                      .out_valid(d_valid), .q(quo_f));
  float_log    u_log (.clk, .rst_n, .in_valid(d_valid), .din(quo_f), .out_valid(l_valid), .dout(log_f));
  float2fixed  u_fl2fx (.clk, .rst_n, .in_valid(l_valid), .din(log_f), .out_valid(out_valid), .dout(wij));
endmodule
