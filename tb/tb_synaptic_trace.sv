// tb_synaptic_trace: a 2 x 3 synaptic matrix receives row- and column-style
// update requests at increasing time steps with random pre-synaptic Zi (and its
// time stamp) and post-synaptic Zj.  A real-valued model keeps each synapse's
// Zi*Zj product, Eij and Pij and applies the closed-form lazy update with
// tau_zij; Eij, Pij, Pij+eps^2 and the 28-cycle latency are checked.
module tb_synaptic_trace;
  import bcpnn_pkg::*;
  import bcpnn_ref_pkg::*;
  localparam int NI = 2, NJ = 3;
  logic clk = 0, rst_n = 0, init = 0, req = 0;
  logic [0:0] i_idx;
  logic [1:0] j_idx;
  time_t curr_time, ti_val;
  fx_t zi_val, zj_now, pij_log;
  logic busy, done;
  ep_t eij, pij;
  int checks = 0, failures = 0;

  synaptic_trace #(.N_IN(NI), .N_MCU(NJ)) dut (.clk, .rst_n, .init, .req, .i_idx, .j_idx, .curr_time,
    .zi_val, .ti_val, .zj_now, .busy, .done, .eij, .pij, .pij_log);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
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

  tr_t model [NI][NJ];
  longint tl [NI][NJ];

  initial begin
    longint t, ti;
    int i, j, cyc;
    real zi, zj;
    tr_t r;
    for (int a = 0; a < NI; a++) for (int b = 0; b < NJ; b++) begin model[a][b] = '{0.0, 0.0, 0.0}; tl[a][b] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    t = 5;
    for (int n = 0; n < 60; n++) begin
      t += $urandom_range(0, 8);
      i = $urandom_range(0, NI - 1);
      j = $urandom_range(0, NJ - 1);
      ti = t - $urandom_range(0, 20);
      zi = real'($urandom_range(0, 3000)) / 1000.0;
      zj = real'($urandom_range(0, 3000)) / 1000.0;
      r = lazy(model[i][j], real'(t - tl[i][j]), TAU_ZIJ, 0.0);
      r.z = zi * $exp(-real'(t - ti) / TAU_ZI) * zj;    // product stored for next time
      model[i][j] = r;
      tl[i][j] = t;
      @(negedge clk);
      curr_time = time_t'(t); ti_val = time_t'(ti);
      zi_val = real2fx(zi); zj_now = real2fx(zj);
      i_idx = 1'(i); j_idx = 2'(j); req = 1;
      @(negedge clk);
      req = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 28) begin failures++; $display("latency %0d", cyc); end
      chk("Eij", fx2real(ep2fx(eij)), r.e, 2e-6);
      chk("Pij", fx2real(ep2fx(pij)), r.p, 2e-6);
      chk("Pij_log", fx2real(pij_log), r.p + EPS * EPS, 2e-6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
