// tb_precision: the three single-value precision cases of the original
// accelerator's evaluation, run through this design's arithmetic chains.
//   bias       beta_j = ln(Pj + eps)                     reference  0.60773897
//   weight     w_ij = ln((Pij+eps^2)/((Pi+eps)(Pj+eps))) reference -0.60796681
//   activation exp(m_j) for m_j = 2 (no normalisation)   reference  7.38905610
// The trace values behind the first two are not published, so they are
// chosen to give the reference results exactly in real arithmetic (Pi = Pj
// from the bias, Pij from the weight); the test then measures how close the
// fixed-point and table-based chains (bias_log, weight_log, and
// fixed2float -> float_exp -> float2fixed) come.  The original fixed-point
// hardware was within 3.5e-7 of these references; this design must be within
// 1e-6 for the bias, 2e-6 for the weight (its chain adds a multiply and a
// division) and 2e-5 (about 3e-6 relative) for the exponential.  Measured:
// about 2.4e-7, 1.2e-6 and 5.8e-6.
// Each result must also appear exactly at its unit's latency.
module tb_precision;
  import bcpnn_pkg::*;
  import bcpnn_ref_pkg::*;
  localparam real REF_B = 0.60773897;
  localparam real REF_W = -0.60796681;
  localparam real REF_A = 7.38905610;
  logic clk = 0, rst_n = 0, v_in = 0;
  fx_t  pj_log, pi_log, pij_log, bias, wij, m_fx, a_fx;
  flt_t m_f, e_f;
  logic b_v, w_v, c_v, e_v, a_v;
  int checks = 0, failures = 0;

  bias_log    u_b (.clk, .rst_n, .in_valid(v_in), .pj_log, .out_valid(b_v), .bias_j(bias));
  weight_log  u_w (.clk, .rst_n, .in_valid(v_in), .pi_log, .pj_log, .pij_log, .out_valid(w_v), .wij);
  fixed2float u_c (.clk, .rst_n, .in_valid(v_in), .din(m_fx), .out_valid(c_v), .dout(m_f));
  float_exp   u_e (.clk, .rst_n, .in_valid(c_v), .din(m_f), .out_valid(e_v), .dout(e_f));
  float2fixed u_f (.clk, .rst_n, .in_valid(e_v), .din(e_f), .out_valid(a_v), .dout(a_fx));

  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, real got, real want, real tol);
    checks++;
    $display("%-10s reference %.8f  this design %.8f  error %.2e", what, want, got, got - want);
    if (absr(got - want) > tol) failures++;
  endtask

  initial begin
    real p, pij;
    int cyc;
    p   = $exp(REF_B) - EPS;
    pij = (p + EPS) * (p + EPS) * $exp(REF_W) - EPS * EPS;
    pj_log  = real2fx(p + EPS);
    pi_log  = real2fx(p + EPS);
    pij_log = real2fx(pij + EPS * EPS);
    m_fx    = real2fx(2.0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    v_in = 1;
    @(negedge clk);
    v_in = 0;
    cyc = 1;
    for (int k = 0; k < 12; k++) begin
      checks += 3;
      if (b_v != (cyc == 5)) failures++;
      if (w_v != (cyc == 9)) failures++;
      if (a_v != (cyc == 5)) failures++;
      if (b_v) chk("bias", fx2real(bias), REF_B, 1e-6);
      if (w_v) chk("weight", fx2real(wij), REF_W, 2e-6);
      if (a_v) chk("activation", fx2real(a_fx), REF_A, 2e-5);
      @(negedge clk);
      cyc++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
