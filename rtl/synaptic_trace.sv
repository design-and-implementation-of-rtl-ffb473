// synaptic_trace: the synaptic matrix (Eij, Pij) of one hypercolumn with its own
// update datapath.
// Each of the N_IN x N_MCU entries holds Eij and Pij (1.1.28), the product
// Zi*Zj at its last update (1.4.28) and that update's time step.  Between two
// updates of a synapse neither of its neurons spiked (every pre or post spike
// updates the row or column), so the stored product simply decays with
// tau_zij = 1/(1/tau_zi + 1/tau_zj) and equations (Eij, Pij lazy update) can use
// it directly; keeping this product per synapse is this design's way of
// providing Zi(t_last)*Zj(t_last).  On req (i, j, curr_time, plus the stored
// pre-synaptic Zi with its time ti_val and the current post-synaptic Zj) the
// entry is read, dt is saturated to 1023, both ports of the exp_result_bram are
// read (port A at dt for tau_zij, tau_e, tau_p*; port B at curr_time - ti_val
// for tau_zi, to bring Zi up to date), the trace_engine runs in synaptic mode
// and the entry is written back with the new product Zi(t)*Zj(t).  done pulses
// 28 cycles after req with Eij, Pij and Pij + eps^2 on the outputs.  Updating a
// synapse twice in one time step is harmless (dt = 0 leaves E and P unchanged).
// init clears the matrix.  A req while busy is ignored.
module synaptic_trace
  import bcpnn_pkg::*;
#(
  parameter int N_IN  = 10,
  parameter int N_MCU = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     init,
  input  logic                     req,
  input  logic [$clog2(N_IN)-1:0]  i_idx,
  input  logic [$clog2(N_MCU)-1:0] j_idx,
  input  time_t                    curr_time,
  input  fx_t                      zi_val,
  input  time_t                    ti_val,
  input  fx_t                      zj_now,
  output logic                     busy,
  output logic                     done,
  output ep_t                      eij,
  output ep_t                      pij,
  output fx_t                      pij_log
);
  typedef struct packed {
    fx_t   zij;
    ep_t   e;
    ep_t   p;
    time_t t_last;
  } syn_t;

  localparam int N_SYN = N_IN * N_MCU;
  syn_t mem [N_SYN];

  typedef enum logic [1:0] {Y_IDLE, Y_READ, Y_GO, Y_WAIT} ystate_e;
  ystate_e st;

  logic [$clog2(N_SYN)-1:0] addr_q;
  logic [DT_W-1:0]          dt_q, dti_q;
  fx_t                      zi_q, zj_q;
  logic [5*EP_W-1:0]        row_a, row_b;
  syn_t                     cur;

  function automatic fx_t col(logic [5*EP_W-1:0] w, exp_col_e c);
    return ep2fx(w[(4 - int'(c)) * EP_W +: EP_W]);
  endfunction

  function automatic logic [DT_W-1:0] sat_dt(time_t now, time_t last);
    time_t d;
    d = now - last;
    return (d > time_t'(DT_MAX)) ? DT_W'(DT_MAX) : d[DT_W-1:0];
  endfunction

  function automatic logic [$clog2(N_SYN)-1:0] syn_addr(logic [$clog2(N_IN)-1:0] i,
                                                        logic [$clog2(N_MCU)-1:0] j);
    return ($clog2(N_SYN))'(int'(i) * N_MCU + int'(j));
  endfunction

  exp_result_bram u_exp (.clk, .addr_a(dt_q), .dout_a(row_a), .addr_b(dti_q), .dout_b(row_b));

  logic eng_done, eng_busy;
  fx_t  z_unused, e_n, p_n, plog_n, zij_n;
  assign cur = mem[addr_q];

  trace_engine u_eng (
    .clk, .rst_n, .start(st == Y_GO), .syn(1'b1),
    .z0(cur.zij), .e0(ep2fx(cur.e)), .p0(ep2fx(cur.p)),
    .ez(col(row_a, COL_ZIJ)), .ee(col(row_a, COL_E)), .ep(col(row_a, COL_P)),
    .s_in('0),
    .coef_a(COEF_A_IJ), .coef_ab(COEF_AB_IJ), .coef_c(COEF_C), .eps(EPS2_FX),
    .zi_val(zi_q), .ezi(col(row_b, COL_ZI)), .zj_now(zj_q),
    .busy(eng_busy), .done(eng_done),
    .z_new(z_unused), .e_new(e_n), .p_new(p_n), .p_log(plog_n), .zij_new(zij_n)
  );

  assign busy = (st != Y_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= Y_IDLE;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        Y_IDLE: if (req && !init) st <= Y_READ;
        Y_READ: st <= Y_GO;
        Y_GO:   st <= Y_WAIT;
        Y_WAIT: if (eng_done) begin st <= Y_IDLE; done <= 1'b1; end
        default: st <= Y_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st == Y_IDLE && req) begin
      addr_q <= syn_addr(i_idx, j_idx);
      dt_q   <= sat_dt(curr_time, mem[syn_addr(i_idx, j_idx)].t_last);
      dti_q  <= sat_dt(curr_time, ti_val);
      zi_q   <= zi_val;
      zj_q   <= zj_now;
    end
    if (init) begin
      for (int k = 0; k < N_SYN; k++) mem[k] <= '{zij: '0, e: '0, p: '0, t_last: '0};
    end else if (st == Y_WAIT && eng_done) begin
      mem[addr_q] <= '{zij: zij_n, e: sat_ep(e_n), p: sat_ep(p_n), t_last: curr_time};
      eij     <= sat_ep(e_n);
      pij     <= sat_ep(p_n);
      pij_log <= plog_n;
    end
  end
endmodule
