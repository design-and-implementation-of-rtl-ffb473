// tb_bcpnn_accelerator: end-to-end test of the accelerator at its default size
// (10 incoming connections, 16 MCUs).  It
//   1. trains for 40 time steps (update_en = 1) with sparse random pre- and
//      post-synaptic spikes and one gap longer than the exponential table,
//      checking every bias and weight written against the floating-point
//      model of the learning rule;
//   2. switches to inference (update_en = 0) and runs 40 time steps with
//      random input spikes, first with no external input (the sum of
//      exponentials is above one, activations are normalised) and then with a
//      strongly negative external input (the sum falls below one), checking
//      every activation and rate against the model of the inference equations
//      using the weights and biases the hardware learned;
//   3. switches back to training for 5 steps and to inference for 2.
// Each mechanism (row update, column update, skipped silent input, saturated
// time gap, both mode switches, normalised and unnormalised activation) is
// counted and must occur.
module tb_bcpnn_accelerator;
  import bcpnn_pkg::*;
  import bcpnn_ref_pkg::*;
  localparam int NI = 10, NJ = 16;
  logic clk = 0, rst_n = 0, update_en = 1, syn_init = 0, const_init = 0, step_start = 0;
  time_t curr_time = '0;
  logic [NI-1:0] spike_i_value = '0, spike_connections = '0;
  logic [NJ-1:0] spike_j_value = '0;
  fx_t ext_in [NJ];
  logic [3:0] mcu_id = '0;
  fx_t rd_oj, rd_rj;
  logic busy, step_done, w_we, b_we, out_valid;
  logic [3:0] w_i;
  logic [3:0] w_j, b_j, out_mcu;
  fx_t w_data, b_data, out_oj, out_rj;
  int checks = 0, failures = 0;
  int sw_to_inf = 0, sw_to_train = 0, n_w = 0, n_b = 0, n_o = 0;
  train_model tm;
  infer_model im;

  bcpnn_accelerator dut (.clk, .rst_n, .update_en, .syn_init, .const_init, .step_start, .curr_time,
    .spike_i_value, .spike_j_value, .spike_connections, .ext_in, .mcu_id, .rd_oj, .rd_rj,
    .busy, .step_done, .w_we, .w_i, .w_j, .w_data, .b_we, .b_j, .b_data,
    .out_valid, .out_mcu, .out_oj, .out_rj);

  always #5 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, real got, real want, real tol);
    checks++;
    if (absr(got - want) > tol) begin
      failures++;
      if (failures < 40) $display("%s t=%0d: want %f got %f", what, curr_time, want, got);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    wr_t x;
    if (w_we) begin
      n_w++;
      x = tm.w_exp.pop_front();
      checks++;
      if (x.i != int'(w_i) || x.j != int'(w_j)) failures++;
      chk("w", fx2real(w_data), x.v, 1e-3);
      im.w[w_i][w_j] = fx2real(w_data);
    end
    if (b_we) begin
      n_b++;
      x = tm.b_exp.pop_front();
      checks++;
      if (x.j != int'(b_j)) failures++;
      chk("b", fx2real(b_data), x.v, 1e-4);
      im.b[b_j] = fx2real(b_data);
    end
    if (out_valid) begin
      n_o++;
      chk("o", fx2real(out_oj), im.o[out_mcu], 1e-4);
      chk("r", fx2real(out_rj), im.r[out_mcu], 1e-5);
    end
  end

  task automatic run_step();
    @(negedge clk);
    step_start = 1;
    @(negedge clk);
    step_start = 0;
    while (!step_done) @(negedge clk);
  endtask

  task automatic train(int steps, int gap_at);
    logic [63:0] si, sj;
    if (!update_en) sw_to_train++;
    update_en = 1;
    for (int n = 0; n < steps; n++) begin
      curr_time += (n == gap_at) ? 1200 : 1;
      si = '0; sj = '0;
      for (int k = 0; k < NI; k++) si[k] = ($urandom_range(0, 11) == 0);
      for (int k = 0; k < NJ; k++) sj[k] = ($urandom_range(0, 11) == 0);
      tm.step(longint'(curr_time), si, sj);
      spike_i_value = si[NI-1:0];
      spike_j_value = sj[NJ-1:0];
      run_step();
    end
  endtask

  task automatic infer(int steps, real ext);
    logic [63:0] si;
    if (update_en) sw_to_inf++;
    update_en = 0;
    for (int j = 0; j < NJ; j++) begin ext_in[j] = real2fx(ext); im.ext[j] = ext; end
    for (int n = 0; n < steps; n++) begin
      curr_time += 1;
      si = '0;
      for (int k = 0; k < NI; k++) si[k] = ($urandom_range(0, 2) == 0);
      im.step(si);
      spike_connections = si[NI-1:0];
      run_step();
      mcu_id = 4'(n);
      #1;
      chk("rd_o", fx2real(rd_oj), im.o[n % NJ], 1e-4);
    end
  endtask

  initial begin
    tm = new(NI, NJ);
    im = new(NI, NJ);
    for (int j = 0; j < NJ; j++) ext_in[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); syn_init = 1; const_init = 1;
    @(negedge clk); syn_init = 0; const_init = 0;
    train(40, 30);
    infer(20, 0.0);
    infer(20, -4.0);
    train(5, -1);
    infer(2, 0.0);
    repeat (5) @(negedge clk);
    checks += 9;
    if (tm.w_exp.size() != 0 || tm.b_exp.size() != 0) begin failures++; $display("missing writes"); end
    if (tm.rows == 0)         begin failures++; $display("no row update"); end
    if (tm.cols == 0)         begin failures++; $display("no column update"); end
    if (tm.skipped == 0)      begin failures++; $display("no skipped input"); end
    if (tm.saturated == 0)    begin failures++; $display("no saturated gap"); end
    if (sw_to_inf == 0)       begin failures++; $display("no switch to inference"); end
    if (sw_to_train == 0)     begin failures++; $display("no switch to training"); end
    if (im.normalised == 0)   begin failures++; $display("never normalised"); end
    if (im.unnormalised == 0) begin failures++; $display("never below one"); end
    $display("rows=%0d cols=%0d skipped=%0d saturated=%0d to_inference=%0d to_training=%0d normalised=%0d unnormalised=%0d",
             tm.rows, tm.cols, tm.skipped, tm.saturated, sw_to_inf, sw_to_train, im.normalised, im.unnormalised);
    $display("weights=%0d biases=%0d activations=%0d", n_w, n_b, n_o);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
