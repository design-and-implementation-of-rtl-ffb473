// tb_mcu_inference_mode: a 3-input, 3-MCU inference core is loaded with random
// weights, biases and external inputs through its write ports and run for a
// series of time steps with random input spikes.  Every streamed activation
// o_j and rate r_j, and the value read back through mcu_id, are compared with
// the floating-point model of the inference equations.  The biases are first
// positive (sum of exponentials above one: normalised) and later strongly
// negative (sum below one: not normalised); both cases must occur.  The
// cycles per time step must be N_MCU * (N_IN + 39) + 3.
module tb_mcu_inference_mode;
  import bcpnn_pkg::*;
  import bcpnn_ref_pkg::*;
  localparam int NI = 3, NJ = 3;
  logic clk = 0, rst_n = 0, const_init = 0, update_en = 0, step_start = 0;
  logic [NI-1:0] spike_connections;
  fx_t ext_in [NJ];
  logic w_we = 0, b_we = 0;
  logic [1:0] w_i, w_j, b_j, mcu_id, out_mcu;
  fx_t w_data, b_data, rd_oj, rd_rj, out_oj, out_rj;
  logic busy, step_done, out_valid;
  int checks = 0, failures = 0, n_out = 0;
  infer_model mdl;

  mcu_inference_mode #(.N_IN(NI), .N_MCU(NJ)) dut (.clk, .rst_n, .const_init, .update_en, .step_start,
    .spike_connections, .ext_in, .w_we, .w_i, .w_j, .w_data, .b_we, .b_j, .b_data, .mcu_id,
    .rd_oj, .rd_rj, .busy, .step_done, .out_valid, .out_mcu, .out_oj, .out_rj);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
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

  always @(negedge clk) if (rst_n && out_valid) begin
    n_out++;
    chk("o_j", fx2real(out_oj), mdl.o[out_mcu], 1e-4);
    chk("r_j", fx2real(out_rj), mdl.r[out_mcu], 1e-5);
  end

  task automatic load_bias(real lo, real hi);
    for (int j = 0; j < NJ; j++) begin
      mdl.b[j] = lo + (hi - lo) * real'($urandom_range(0, 1000)) / 1000.0;
      @(negedge clk);
      b_we = 1; b_j = 2'(j); b_data = real2fx(mdl.b[j]);
      @(negedge clk);
      b_we = 0;
    end
  endtask

  initial begin
    logic [63:0] si;
    int cyc;
    mdl = new(NI, NJ);
    for (int j = 0; j < NJ; j++) begin
      mdl.ext[j] = real'($urandom_range(0, 500)) / 1000.0;
      ext_in[j] = real2fx(mdl.ext[j]);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); const_init = 1; @(negedge clk); const_init = 0;
    for (int i = 0; i < NI; i++) for (int j = 0; j < NJ; j++) begin
      mdl.w[i][j] = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0;
      @(negedge clk);
      w_we = 1; w_i = 2'(i); w_j = 2'(j); w_data = real2fx(mdl.w[i][j]);
      @(negedge clk);
      w_we = 0;
    end
    load_bias(-0.5, 0.5);
    for (int n = 0; n < 60; n++) begin
      if (n == 20) load_bias(-6.0, -4.0);
      si = 64'($urandom_range(0, 7));
      mdl.step(si);
      @(negedge clk);
      spike_connections = si[NI-1:0];
      step_start = 1;
      @(negedge clk);
      step_start = 0;
      cyc = 1;
      while (!step_done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != NJ * (NI + 39) + 3) begin
        failures++;
        if (failures < 10) $display("step took %0d cycles", cyc);
      end
      mcu_id = 2'(n % NJ);
      #1;
      chk("rd_oj", fx2real(rd_oj), mdl.o[n % NJ], 1e-4);
      chk("rd_rj", fx2real(rd_rj), mdl.r[n % NJ], 1e-5);
    end
    checks += 3;
    if (n_out != 60 * NJ) begin failures++; $display("outputs %0d", n_out); end
    if (mdl.normalised == 0)   begin failures++; $display("never normalised"); end
    if (mdl.unnormalised == 0) begin failures++; $display("never below one"); end
    $display("normalised=%0d unnormalised=%0d", mdl.normalised, mdl.unnormalised);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
