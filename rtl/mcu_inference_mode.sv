// mcu_inference_mode: the inference core of one hypercolumn.
// Once per time step (step_start with update_en = 0) it advances every MCU j
// by one explicit-Euler step of dt = 1 ms:
//   acc     = sum_i w_ij * S_i                       (weights from weight_bram)
//   s_syn  += (acc - s_syn) / tau_zi
//   s_j     = beta_j + s_syn + I_j
//   m_j    += (s_j - m_j) / tau_m
//   e_j     = exp(gamma_m * m_j)                     (fixed2float, float_exp, float2fixed)
// and accumulates sum_k e_k.  A second pass then forms the activation
// o_j = e_j / sum if sum > 1, else e_j, and the rate r_j = o_j * r_max, stored
// and streamed out on out_valid/out_mcu/out_oj/out_rj; step_done follows.
// The per-MCU state (s_syn, s, m, e, o: 5 x 33 bits) lives in mcu_inf_bram;
// the weights in weight_bram and the biases in a bias memory, both written by
// the training half through w_we / b_we.  The datapath has the design's three
// adders and two multipliers: adder 3 accumulates the weighted spikes, adder 2
// forms beta_j + I_j, adder 1 and the multipliers do the rest; the sum of
// exponentials uses a wider 40-bit accumulator and the normalisation one
// reciprocal per step (a fixed-point divider), both this design's own choices
// since the source does not say how the division is done.  The step schedule,
// the Euler discretisation and all constants (tau_zi, tau_m, gamma_m, r_max in
// bcpnn_pkg) are this design's own.  Per MCU the first pass takes
// N_IN + 31 cycles and the second 8, so a time step of the whole hypercolumn
// takes N_MCU * (N_IN + 39) + 2 cycles.  const_init clears the MCU state.
// mcu_id selects the MCU shown on rd_oj / rd_rj.
module mcu_inference_mode
  import bcpnn_pkg::*;
#(
  parameter int N_IN  = 10,
  parameter int N_MCU = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     const_init,
  input  logic                     update_en,
  input  logic                     step_start,
  input  logic [N_IN-1:0]          spike_connections,
  input  fx_t                      ext_in [N_MCU],
  input  logic                     w_we,
  input  logic [$clog2(N_IN)-1:0]  w_i,
  input  logic [$clog2(N_MCU)-1:0] w_j,
  input  fx_t                      w_data,
  input  logic                     b_we,
  input  logic [$clog2(N_MCU)-1:0] b_j,
  input  fx_t                      b_data,
  input  logic [$clog2(N_MCU)-1:0] mcu_id,
  output fx_t                      rd_oj,
  output fx_t                      rd_rj,
  output logic                     busy,
  output logic                     step_done,
  output logic                     out_valid,
  output logic [$clog2(N_MCU)-1:0] out_mcu,
  output fx_t                      out_oj,
  output fx_t                      out_rj
);
  localparam int IW = $clog2(N_IN);
  localparam int JW = $clog2(N_MCU);
  localparam int SUM_W = 40;

  typedef struct packed {
    fx_t s_syn;
    fx_t s;
    fx_t m;
    fx_t e;
    fx_t o;
  } mcu_state_t;

  mcu_state_t mcu_inf_bram [N_MCU];
  fx_t        weight_bram  [N_IN * N_MCU];
  fx_t        bias_mem     [N_MCU];
  fx_t        rate_mem     [N_MCU];

  typedef enum logic [3:0] {
    F_IDLE, F_ACC, F_U1, F_U2, F_U3, F_U4, F_U5, F_U6, F_U7, F_U8, F_EXP, F_SUM,
    F_RECIP, F_NORM, F_RATE, F_DONE
  } fstate_e;
  fstate_e st;
  logic [2:0] cnt;

  logic [N_IN-1:0] si_q;
  logic [JW:0]     j_q;
  logic [IW:0]     k_q;       // weight read index
  wire  [JW-1:0]   j_idx = j_q[JW-1:0];
  mcu_state_t      cur;
  fx_t             acc, d1, bi, x1, ssyn_n, s_n, d2, x2, m_n, g, e_n, o_n;
  logic [SUM_W-1:0] sum_q;
  fx_t             recip;

  // ---------------- arithmetic units ----------------
  fx_t m1a, m1b, m2a, m2b, a1a, a1b, a2a, a2b, a3a, a3b;
  fx_t m1p, m2p, a1s, a2s, a3s;
  fx_multiplier u_mul1 (.clk, .a(m1a), .b(m1b), .p(m1p));
  fx_multiplier u_mul2 (.clk, .a(m2a), .b(m2b), .p(m2p));
  fx_adder      u_add1 (.clk, .a(a1a), .b(a1b), .s(a1s));
  fx_adder      u_add2 (.clk, .a(a2a), .b(a2b), .s(a2s));
  fx_adder      u_add3 (.clk, .a(a3a), .b(a3b), .s(a3s));

  // exponential chain
  logic x_valid, ef_valid, e_valid;
  flt_t g_f, e_f;
  fx_t  e_fx;
  fixed2float u_f2f (.clk, .rst_n, .in_valid(st == F_EXP && cnt == 3'd0), .din(g),
                     .out_valid(x_valid), .dout(g_f));
  float_exp   u_exp (.clk, .rst_n, .in_valid(x_valid), .din(g_f), .out_valid(ef_valid), .dout(e_f));
  float2fixed u_fl2fx (.clk, .rst_n, .in_valid(ef_valid), .din(e_f), .out_valid(e_valid), .dout(e_fx));

  // weight read (one cycle latency)
  fx_t  w_rd;
  logic w_rd_valid, w_rd_spk;
  always_ff @(posedge clk) begin
    w_rd       <= weight_bram[int'(k_q[IW-1:0]) * N_MCU + int'(j_idx)];
    w_rd_spk   <= si_q[k_q[IW-1:0]];
    w_rd_valid <= (st == F_ACC) && (k_q < (IW+1)'(N_IN));
  end

  always_comb begin
    m1a = '0; m1b = '0; m2a = '0; m2b = '0;
    a1a = '0; a1b = '0; a2a = '0; a2b = '0;
    a3a = a3s; a3b = (w_rd_valid && w_rd_spk) ? w_rd : '0;   // running weighted sum
    if (st == F_ACC && k_q == '0) a3a = '0;
    unique case (st)
      F_U1:  begin a1a = acc; a1b = -cur.s_syn; a2a = bias_mem[j_idx]; a2b = ext_in[j_idx]; end
      F_U2:  begin m1a = d1; m1b = K_ZI_FX; end
      F_U3:  begin a1a = cur.s_syn; a1b = x1; end
      F_U4:  begin a1a = ssyn_n; a1b = bi; end
      F_U5:  begin a1a = s_n; a1b = -cur.m; end
      F_U6:  begin m1a = d2; m1b = K_M_FX; end
      F_U7:  begin a1a = cur.m; a1b = x2; end
      F_U8:  begin m1a = GAMMA_FX; m1b = m_n; end
      F_NORM: begin m1a = cur.e; m1b = recip; end
      F_RATE: begin m2a = o_n; m2b = RMAX_FX; end
      default: ;
    endcase
  end

  // ---------------- sequencer ----------------
  function automatic logic [2:0] step_len(fstate_e s);
    unique case (s)
      F_U2, F_U6, F_U8, F_NORM, F_RATE: return 3'd3;
      default:                          return 3'd1;
    endcase
  endfunction

  assign cur  = mcu_inf_bram[j_idx];
  assign busy = (st != F_IDLE);

  // The input spike vector is sampled when a step is accepted; no reset needed.
  always_ff @(posedge clk)
    if (st == F_IDLE && step_start && !update_en && !const_init) si_q <= spike_connections;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= F_IDLE;
      cnt       <= '0;
      j_q       <= '0;
      k_q       <= '0;
      step_done <= 1'b0;
      out_valid <= 1'b0;
      sum_q     <= '0;
    end else begin
      step_done <= 1'b0;
      out_valid <= 1'b0;
      unique case (st)
        F_IDLE: if (step_start && !update_en && !const_init) begin
          j_q   <= '0;
          k_q   <= '0;
          sum_q <= '0;
          st    <= F_ACC;
        end
        F_ACC: begin
          // k runs 0..N_IN-1 issuing reads; two more cycles drain the adder
          k_q <= k_q + 1'b1;
          if (k_q == (IW+1)'(N_IN + 1)) begin
            cnt <= '0;
            st  <= F_U1;
          end
        end
        F_U1, F_U2, F_U3, F_U4, F_U5, F_U6, F_U7, F_U8, F_NORM, F_RATE: begin
          if (cnt == step_len(st)) begin
            cnt <= '0;
            if (st == F_NORM)      st <= F_RATE;
            else if (st == F_RATE) begin
              out_valid <= 1'b1;
              if (j_q == (JW+1)'(N_MCU - 1)) st <= F_DONE;
              else begin
                j_q <= j_q + 1'b1;
                st  <= F_NORM;
              end
            end
            else st <= fstate_e'(st + 4'd1);
          end else begin
            cnt <= cnt + 3'd1;
          end
        end
        F_EXP: begin
          cnt <= 3'd1;
          if (e_valid) begin
            cnt <= '0;
            st  <= F_SUM;
          end
        end
        F_SUM: begin
          sum_q <= sum_q + SUM_W'(unsigned'(e_n));
          if (j_q == (JW+1)'(N_MCU - 1)) begin
            st <= F_RECIP;
          end else begin
            j_q <= j_q + 1'b1;
            k_q <= '0;
            st  <= F_ACC;
          end
        end
        F_RECIP: begin
          j_q <= '0;
          cnt <= '0;
          st  <= F_NORM;
        end
        F_DONE: begin
          step_done <= 1'b1;
          st        <= F_IDLE;
        end
        default: st <= F_IDLE;
      endcase
    end
  end

  // ---------------- result capture and memories ----------------
  always_ff @(posedge clk) begin
    if (st == F_ACC && k_q == (IW+1)'(N_IN + 1)) acc <= a3s;
    if (cnt == step_len(st)) begin
      unique case (st)
        F_U1:   begin d1 <= a1s; bi <= a2s; end
        F_U2:   x1 <= m1p;
        F_U3:   ssyn_n <= a1s;
        F_U4:   s_n <= a1s;
        F_U5:   d2 <= a1s;
        F_U6:   x2 <= m1p;
        F_U7:   m_n <= a1s;
        F_U8:   g <= m1p;
        F_NORM: o_n <= m1p;
        default: ;
      endcase
    end
    if (st == F_EXP && e_valid) e_n <= e_fx;
    if (st == F_RECIP)
      recip <= (sum_q > SUM_W'(FX_ONE)) ? fx_t'((80'd1 << (2 * FRAC)) / 80'(sum_q)) : FX_ONE;
    if (st == F_RATE && cnt == step_len(st)) begin
      out_mcu <= j_idx;
      out_oj  <= o_n;
      out_rj  <= m2p;
      rate_mem[j_idx] <= m2p;
    end

    if (w_we) weight_bram[int'(w_i) * N_MCU + int'(w_j)] <= w_data;
    if (b_we) bias_mem[b_j] <= b_data;

    if (const_init) begin
      for (int k = 0; k < N_MCU; k++) begin
        mcu_inf_bram[k] <= '0;
        rate_mem[k]     <= '0;
      end
    end else if (st == F_SUM) begin
      mcu_inf_bram[j_idx] <= '{s_syn: ssyn_n, s: s_n, m: m_n, e: e_n, o: cur.o};
    end else if (st == F_RATE && cnt == step_len(st)) begin
      mcu_inf_bram[j_idx].o <= o_n;
    end
  end

  assign rd_oj = mcu_inf_bram[mcu_id].o;
  assign rd_rj = rate_mem[mcu_id];
endmodule
