// trace_vector: a vector of pre-synaptic (Zi, Ei, Pi) or post-synaptic
// (Zj, Ej, Pj) traces with its own update datapath.
// Each entry holds Z (1.4.28), E and P (1.1.28), P + eps (the argument of the
// bias / weight logarithm) and the time step of its last update.  A request
// (req pulse with idx, spike and curr_time) reads the entry, saturates the
// elapsed time dt = curr_time - t_last to 1023, looks up the five attenuation
// factors in its exp_result_bram, runs the lazy-update equations on its
// trace_engine (two adders, two multipliers) and writes the entry back with
// t_last = curr_time.  done pulses 26 cycles after req, with the new values on
// z_out/e_out/p_out/plog_out.  The same module serves as the pre-synaptic
// vector (IS_POST = 0, tau_zi column, updated only on a pre-synaptic spike) and
// the post-synaptic vector (IS_POST = 1, tau_zj column, updated every time
// step); which entries are updated when is decided by mcu_updating_mode.  The
// read port (rd_idx) gives the stored state of any entry combinationally, for
// the synaptic and weight updates.  init clears every entry to zero with
// t_last = 0 (the design's own reset choice).  A req while busy is ignored.
module trace_vector
  import bcpnn_pkg::*;
#(
  parameter int N       = 10,
  parameter bit IS_POST = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  input  logic                 req,
  input  logic [$clog2(N)-1:0] idx,
  input  logic                 spike,
  input  time_t                curr_time,
  output logic                 busy,
  output logic                 done,
  output fx_t                  z_out,
  output ep_t                  e_out,
  output ep_t                  p_out,
  output fx_t                  plog_out,
  input  logic [$clog2(N)-1:0] rd_idx,
  output fx_t                  rd_z,
  output fx_t                  rd_plog,
  output time_t                rd_t
);
  typedef struct packed {
    fx_t   z;
    ep_t   e;
    ep_t   p;
    fx_t   plog;
    time_t t_last;
  } entry_t;

  entry_t mem [N];

  typedef enum logic [1:0] {V_IDLE, V_READ, V_GO, V_WAIT} vstate_e;
  vstate_e st;

  logic [$clog2(N)-1:0] idx_q;
  logic                 spike_q;
  logic [DT_W-1:0]      dt_q;
  logic [5*EP_W-1:0]    exp_row, exp_unused;
  entry_t               cur;

  localparam exp_col_e ZCOL = IS_POST ? COL_ZJ : COL_ZI;
  localparam fx_t      CA   = IS_POST ? COEF_A_J  : COEF_A_I;
  localparam fx_t      CAB  = IS_POST ? COEF_AB_J : COEF_AB_I;

  function automatic fx_t col(logic [5*EP_W-1:0] w, exp_col_e c);
    return ep2fx(w[(4 - int'(c)) * EP_W +: EP_W]);
  endfunction

  function automatic logic [DT_W-1:0] sat_dt(time_t now, time_t last);
    time_t d;
    d = now - last;
    return (d > time_t'(DT_MAX)) ? DT_W'(DT_MAX) : d[DT_W-1:0];
  endfunction

  exp_result_bram u_exp (
    .clk, .addr_a(dt_q), .dout_a(exp_row), .addr_b('0), .dout_b(exp_unused)
  );

  logic eng_start, eng_done, eng_busy;
  fx_t  z_n, e_n, p_n, plog_n, zij_unused;

  assign cur       = mem[idx_q];
  assign eng_start = (st == V_GO);

  trace_engine u_eng (
    .clk, .rst_n, .start(eng_start), .syn(1'b0),
    .z0(cur.z), .e0(ep2fx(cur.e)), .p0(ep2fx(cur.p)),
    .ez(col(exp_row, ZCOL)), .ee(col(exp_row, COL_E)), .ep(col(exp_row, COL_P)),
    .s_in(spike_q ? FX_ONE : '0),
    .coef_a(CA), .coef_ab(CAB), .coef_c(COEF_C), .eps(EPS_FX),
    .zi_val('0), .ezi('0), .zj_now('0),
    .busy(eng_busy), .done(eng_done),
    .z_new(z_n), .e_new(e_n), .p_new(p_n), .p_log(plog_n), .zij_new(zij_unused)
  );

  assign busy = (st != V_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= V_IDLE;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        V_IDLE: if (req && !init) st <= V_READ;
        V_READ: st <= V_GO;
        V_GO:   st <= V_WAIT;
        V_WAIT: if (eng_done) begin st <= V_IDLE; done <= 1'b1; end
        default: st <= V_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st == V_IDLE && req) begin
      idx_q   <= idx;
      spike_q <= spike;
      dt_q    <= sat_dt(curr_time, mem[idx].t_last);
    end
    if (init) begin
      for (int k = 0; k < N; k++) mem[k] <= '{z: '0, e: '0, p: '0, plog: EPS_FX, t_last: '0};
    end else if (st == V_WAIT && eng_done) begin
      mem[idx_q] <= '{z: z_n, e: sat_ep(e_n), p: sat_ep(p_n), plog: plog_n,
                      t_last: curr_time};
      z_out    <= z_n;
      e_out    <= sat_ep(e_n);
      p_out    <= sat_ep(p_n);
      plog_out <= plog_n;
    end
  end

  assign rd_z    = mem[rd_idx].z;
  assign rd_plog = mem[rd_idx].plog;
  assign rd_t    = mem[rd_idx].t_last;
endmodule
