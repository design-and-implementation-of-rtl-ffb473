// tb_trace_vector: a 4-entry pre-synaptic vector and a 4-entry post-synaptic
// vector receive update requests at increasing time steps, with and without
// spikes, including one gap longer than the 1023-step table (which the
// hardware, by design, treats as 1023 steps).  A real-valued model of the closed-form lazy update checks every Z, E, P and P+eps, the
// stored values seen on the read port, and the 26-cycle request-to-done latency.
module tb_trace_vector;
  import bcpnn_pkg::*;
  import bcpnn_ref_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, init = 0;
  logic req [2];
  logic [1:0] idx [2];
  logic spike [2];
  time_t curr_time;
  logic busy [2], done [2];
  fx_t z_out [2], plog_out [2], rd_z [2], rd_plog [2];
  ep_t e_out [2], p_out [2];
  time_t rd_t [2];
  logic [1:0] rd_idx [2];
  int checks = 0, failures = 0, saturated = 0;

  trace_vector #(.N(N), .IS_POST(1'b0)) dut_pre (.clk, .rst_n, .init, .req(req[0]), .idx(idx[0]),
    .spike(spike[0]), .curr_time, .busy(busy[0]), .done(done[0]), .z_out(z_out[0]), .e_out(e_out[0]),
    .p_out(p_out[0]), .plog_out(plog_out[0]), .rd_idx(rd_idx[0]), .rd_z(rd_z[0]), .rd_plog(rd_plog[0]),
    .rd_t(rd_t[0]));
  trace_vector #(.N(N), .IS_POST(1'b1)) dut_post (.clk, .rst_n, .init, .req(req[1]), .idx(idx[1]),
    .spike(spike[1]), .curr_time, .busy(busy[1]), .done(done[1]), .z_out(z_out[1]), .e_out(e_out[1]),
    .p_out(p_out[1]), .plog_out(plog_out[1]), .rd_idx(rd_idx[1]), .rd_z(rd_z[1]), .rd_plog(rd_plog[1]),
    .rd_t(rd_t[1]));

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
      if (failures < 10) $display("%s: want %f got %f ", what, want, got);
    end
  endtask

  tr_t  model [2][N];
  longint tlast [2][N];

  initial begin
    longint t;
    int v, k, cyc, sp;
    real tol;
    tr_t r;
    for (int m = 0; m < 2; m++) begin
      req[m] = 0; idx[m] = '0; spike[m] = 0; rd_idx[m] = '0;
      for (int q = 0; q < N; q++) begin model[m][q] = '{0.0, 0.0, 0.0}; tlast[m][q] = 0; end
    end
    curr_time = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    t = 1;
    for (int n = 0; n < 80; n++) begin
      t += (n == 40) ? 1500 : $urandom_range(0, 12);
      v = n % 2;
      k = $urandom_range(0, N - 1);
      sp = (v == 1) ? $urandom_range(0, 1) : 1;
      if (t - tlast[v][k] > 1023) saturated++;
      tol = 2e-6;
      // the table covers 0..1023 steps; longer gaps are treated as 1023
      r = lazy(model[v][k], real'((t - tlast[v][k] > 1023) ? 1023 : t - tlast[v][k]),
               v ? TAU_ZJ : TAU_ZI, real'(sp));
      model[v][k] = r;
      tlast[v][k] = t;
      @(negedge clk);
      curr_time = time_t'(t);
      idx[v] = 2'(k); spike[v] = sp[0]; req[v] = 1;
      @(negedge clk);
      req[v] = 0;
      cyc = 1;
      while (!done[v]) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 26) begin failures++; $display("latency %0d", cyc); end
      chk("Z", fx2real(z_out[v]), r.z, tol);
      chk("E", fx2real(ep2fx(e_out[v])), r.e, tol);
      chk("P", fx2real(ep2fx(p_out[v])), r.p, tol);
      chk("Plog", fx2real(plog_out[v]), r.p + EPS, tol);
      @(negedge clk);
      rd_idx[v] = 2'(k);
      #1;
      chk("rd_z", fx2real(rd_z[v]), r.z, tol);
      chk("rd_plog", fx2real(rd_plog[v]), r.p + EPS, tol);
      checks++;
      if (rd_t[v] != time_t'(t)) failures++;
    end
    checks++;
    if (saturated == 0) begin failures++; $display("no saturated gap exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
