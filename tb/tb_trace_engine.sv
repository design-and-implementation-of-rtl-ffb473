// tb_trace_engine: drives random trace states and elapsed times into the
// engine, feeding it exp factors computed here with $exp, and compares Z', E',
// P', P'+eps (and in synaptic mode the new Zi*Zj product) with the closed-form
// lazy-update equations evaluated in real arithmetic.  Also checks that done
// comes 23 cycles after start (25 in synaptic mode).
module tb_trace_engine;
  import bcpnn_pkg::*;
  import bcpnn_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, syn = 0;
  fx_t z0, e0, p0, ez, ee, ep, s_in, ca, cab, cc, eps, zi_val, ezi, zj_now;
  logic busy, done;
  fx_t z_new, e_new, p_new, p_log, zij_new;
  int checks = 0, failures = 0;

  trace_engine dut (.clk, .rst_n, .start, .syn, .z0, .e0, .p0, .ez, .ee, .ep, .s_in,
    .coef_a(ca), .coef_ab(cab), .coef_c(cc), .eps, .zi_val, .ezi, .zj_now,
    .busy, .done, .z_new, .e_new, .p_new, .p_log, .zij_new);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, real got, real want, real tol);
    checks++;
    if (absr(got - want) > tol) begin
      failures++;
      if (failures < 10) $display("%s: want %f got %f", what, want, got);
    end
  endtask

  initial begin
    tr_t s, r;
    real dt, tz, zi_r, zj_r, dti;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      syn = (n % 2 == 1);
      tz  = syn ? TAU_ZIJ : TAU_ZI;
      s.z = real'($urandom_range(0, 4000)) / 1000.0;
      s.e = real'($urandom_range(0, 1000)) / 1000.0;
      s.p = real'($urandom_range(0, 1000)) / 1000.0;
      dt  = real'($urandom_range(0, 60));
      zi_r = real'($urandom_range(0, 3000)) / 1000.0;
      zj_r = real'($urandom_range(0, 3000)) / 1000.0;
      dti  = real'($urandom_range(0, 30));
      r = lazy(s, dt, tz, syn ? 0.0 : 1.0);
      @(negedge clk);
      z0 = real2fx(s.z); e0 = real2fx(s.e); p0 = real2fx(s.p);
      ez = real2fx($exp(-dt / tz)); ee = real2fx($exp(-dt / TAU_E)); ep = real2fx($exp(-dt / TAU_P));
      s_in = syn ? '0 : FX_ONE;
      ca  = real2fx(tz / (tz - TAU_E));
      cab = real2fx(tz / (tz - TAU_E) * tz / (tz - TAU_P));
      cc  = real2fx(TAU_E / (TAU_E - TAU_P));
      eps = real2fx(EPS);
      zi_val = real2fx(zi_r); ezi = real2fx($exp(-dti / TAU_ZI)); zj_now = real2fx(zj_r);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != (syn ? 25 : 23)) begin
        failures++;
        $display("latency %0d", cyc);
      end
      chk("E", fx2real(e_new), r.e, 2e-7);
      chk("P", fx2real(p_new), r.p, 2e-7);
      chk("Plog", fx2real(p_log), r.p + EPS, 2e-7);
      if (!syn) chk("Z", fx2real(z_new), r.z, 2e-7);
      else      chk("Zij", fx2real(zij_new), zi_r * $exp(-dti / TAU_ZI) * zj_r, 2e-7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
