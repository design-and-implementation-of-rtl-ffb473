// exp_result_bram: block-memory lookup of the trace attenuation factors.
// Lazy updates need f(dt) = exp(-dt/tau) for the elapsed number of time steps
// dt.  Instead of computing the exponential, a 1024-word ROM is addressed by dt
// (0..1023, the caller saturates larger gaps to 1023, where every factor is
// close to zero) and returns, in one 150-bit word, the five factors for tau_zi,
// tau_zj, tau_zij, tau_e and tau_p* side by side, each as 30-bit 1.1.28.  The
// depth, the word width and the five columns follow the design; the order of
// the columns inside the word (tau_zi in the top 30 bits down to tau_p* in the
// bottom 30) and the table contents, round(exp(-dt/tau) * 2^28), are computed at
// start-up from the time constants in bcpnn_pkg.  Two read ports (the second
// used by the synaptic update), each with one cycle of read latency.
module exp_result_bram
  import bcpnn_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr_a,
  output logic [5*EP_W-1:0]        dout_a,
  input  logic [$clog2(DEPTH)-1:0] addr_b,
  output logic [5*EP_W-1:0]        dout_b
);
  logic [5*EP_W-1:0] mem [DEPTH];

  function automatic logic [EP_W-1:0] entry(int dt, real tau);
    fx_t v;
    v = real2fx($exp(-real'(dt) / tau));
    return v[EP_W-1:0];
  endfunction

  initial begin
    for (int k = 0; k < DEPTH; k++)
      mem[k] = {entry(k, TAU_ZI), entry(k, TAU_ZJ), entry(k, TAU_ZIJ),
                entry(k, TAU_E), entry(k, TAU_P)};
  end

  always_ff @(posedge clk) begin
    dout_a <= mem[addr_a];
    dout_b <= mem[addr_b];
  end
endmodule
