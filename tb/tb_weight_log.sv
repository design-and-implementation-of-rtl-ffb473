// tb_weight_log: random P traces in [0, 1] (offset by eps and eps^2 as the
// trace units deliver them) streamed one set per cycle; each weight must equal
// ln((Pij+eps^2)/((Pi+eps)(Pj+eps))) to within 2e-4 and arrive 9 cycles
// after its operands.
module tb_weight_log;
  import bcpnn_pkg::*;
  import bcpnn_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  fx_t pi_log, pj_log, pij_log, wij;
  int checks = 0, failures = 0;
  real want_q [$];
  int  t_in [$];
  int  cyc = 0;
  weight_log dut (.clk, .rst_n, .in_valid, .pi_log, .pj_log, .pij_log, .out_valid, .wij);
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
    got  = fx2real(wij);
    checks += 2;
    if (cyc - t_in.pop_front() != 9) begin failures++; $display("latency"); end
    if (absr(got - want) > 2e-4) begin
      failures++;
      if (failures < 5) $display("w want %f got %f", want, got);
    end
  end
  initial begin
    real pi, pj, pij;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      pi  = real'($urandom_range(0, 1000)) / 1000.0;
      pj  = real'($urandom_range(0, 1000)) / 1000.0;
      pij = real'($urandom_range(0, 1000)) / 1000.0 * (pi < pj ? pi : pj);
      if (n == 0) begin pi = 0.0; pj = 0.0; pij = 0.0; end
      pi_log = real2fx(pi + EPS); pj_log = real2fx(pj + EPS); pij_log = real2fx(pij + EPS * EPS);
      want_q.push_back(weight(pi, pj, pij));
      t_in.push_back(cyc);
      in_valid = (n % 4 != 3);
      if (!in_valid) begin void'(want_q.pop_back()); void'(t_in.pop_back()); end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (15) @(negedge clk);
    checks++;
    if (want_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
