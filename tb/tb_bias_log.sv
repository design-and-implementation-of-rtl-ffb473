// tb_bias_log: random Pj in [0, 1] (offset by eps) streamed with gaps; each
// bias must equal ln(Pj + eps) to within 1e-5 and arrive 5 cycles later.
module tb_bias_log;
  import bcpnn_pkg::*;
  import bcpnn_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  fx_t pj_log, bias_j;
  int checks = 0, failures = 0;
  real want_q [$];
  int  t_in [$];
  int  cyc = 0;
  bias_log dut (.clk, .rst_n, .in_valid, .pj_log, .out_valid, .bias_j);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(negedge clk) if (rst_n && out_valid) begin
    real want, got;
    want = want_q.pop_front();
    got  = fx2real(bias_j);
    checks += 2;
    if (cyc - t_in.pop_front() != 5) begin failures++; $display("latency"); end
    if (absr(got - want) > 1e-5) begin
      failures++;
      if (failures < 5) $display("b want %f got %f", want, got);
    end
  end
  initial begin
    real pj;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      pj = real'($urandom_range(0, 1000000)) / 1000000.0;
      if (n == 0) pj = 0.0;
      pj_log = real2fx(pj + EPS);
      in_valid = (n % 3 != 2);
      if (in_valid) begin
        want_q.push_back(bias(pj));
        t_in.push_back(cyc);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (want_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
