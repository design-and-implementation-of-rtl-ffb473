// tb_mcu_updating_mode: a 3-input, 2-MCU training half runs a sequence of time
// steps with random pre- and post-synaptic spikes (including steps without any
// spike and a gap of more than 1023 steps).  Every bias and weight written out
// is compared, in order, with the floating-point model of the learning rule;
// the number of row updates, column updates and skipped (silent) inputs is
// checked through the count of weight writes, and back-to-back weight updates
// must follow each other every 29 cycles.
module tb_mcu_updating_mode;
  import bcpnn_pkg::*;
  import bcpnn_ref_pkg::*;
  localparam int NI = 3, NJ = 2;
  logic clk = 0, rst_n = 0, syn_init = 0, update_en = 1, step_start = 0;
  time_t curr_time;
  logic [NI-1:0] spike_i_value;
  logic [NJ-1:0] spike_j_value;
  logic busy, step_done, w_we, b_we;
  logic [1:0] w_i;
  logic [0:0] w_j, b_j;
  fx_t w_data, b_data;
  int checks = 0, failures = 0, n_w = 0, n_b = 0;
  int cyc_now = 0, last_w = -1000, min_gap = 1000000;
  train_model mdl;

  mcu_updating_mode #(.N_IN(NI), .N_MCU(NJ)) dut (.clk, .rst_n, .syn_init, .update_en, .step_start,
    .curr_time, .spike_i_value, .spike_j_value, .busy, .step_done, .w_we, .w_i, .w_j, .w_data,
    .b_we, .b_j, .b_data);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc_now <= cyc_now + 1;

  always @(negedge clk) if (rst_n) begin
    wr_t x;
    if (w_we) begin
      n_w++;
      if (cyc_now - last_w < min_gap) min_gap = cyc_now - last_w;
      last_w = cyc_now;
      x = mdl.w_exp.pop_front();
      checks++;
      if (x.i != int'(w_i) || x.j != int'(w_j) || absr(fx2real(w_data) - x.v) > 1e-3) begin
        failures++;
        if (failures < 10) $display("w(%0d,%0d) want (%0d,%0d) %f got %f", w_i, w_j, x.i, x.j, x.v, fx2real(w_data));
      end
    end
    if (b_we) begin
      n_b++;
      x = mdl.b_exp.pop_front();
      checks++;
      if (x.j != int'(b_j) || absr(fx2real(b_data) - x.v) > 1e-4) begin
        failures++;
        if (failures < 10) $display("b(%0d) want %f got %f", b_j, x.v, fx2real(b_data));
      end
    end
  end

  initial begin
    longint t;
    int cyc, nsyn;
    logic [63:0] si, sj;
    mdl = new(NI, NJ);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); syn_init = 1; @(negedge clk); syn_init = 0;
    t = 0;
    for (int n = 0; n < 60; n++) begin
      t += (n == 40) ? 1100 : $urandom_range(1, 6);
      // sparse activity keeps the E and P traces inside their [0, 1] range
      si = '0; sj = '0;
      for (int k = 0; k < NI; k++) si[k] = ($urandom_range(0, 3) == 0);
      for (int k = 0; k < NJ; k++) sj[k] = ($urandom_range(0, 3) == 0);
      if (n % 5 == 4) begin si = '0; sj = '0; end
      mdl.step(t, si, sj);
      @(negedge clk);
      curr_time = time_t'(t);
      spike_i_value = si[NI-1:0];
      spike_j_value = sj[NJ-1:0];
      step_start = 1;
      @(negedge clk);
      step_start = 0;
      cyc = 1;
      while (!step_done) begin @(negedge clk); cyc++; end
      nsyn = $countones(si[NI-1:0]) * NJ + $countones(sj[NJ-1:0]) * NI;
      if (nsyn > 0 && n < 3)
        $display("step %0d: %0d cycles, %0d synapse updates", n, cyc, nsyn);
    end
    repeat (5) @(negedge clk);
    checks += 5;
    if (mdl.w_exp.size() != 0 || mdl.b_exp.size() != 0) begin failures++; $display("missing writes"); end
    checks++;
    if (min_gap != 29) begin failures++; $display("weight update every %0d cycles, expected 29", min_gap); end
    if (mdl.rows == 0)      begin failures++; $display("no row update"); end
    if (mdl.cols == 0)      begin failures++; $display("no column update"); end
    if (mdl.skipped == 0)   begin failures++; $display("no skipped input"); end
    if (mdl.saturated == 0) begin failures++; $display("no saturated gap"); end
    $display("rows=%0d cols=%0d skipped=%0d saturated=%0d weights=%0d biases=%0d",
             mdl.rows, mdl.cols, mdl.skipped, mdl.saturated, n_w, n_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
