// mcu_updating_mode: the training-mode half of the accelerator for one
// hypercolumn with N_IN incoming connections and N_MCU minicolumns.
// It owns the pre-synaptic trace vector, the post-synaptic trace vector, the
// synaptic matrix and the weight and bias units, and sequences them with the
// hybrid update scheme of the design.  On step_start (with update_en = 1) it
// latches the spike vectors of the time step and then
//   1. updates every post-synaptic entry j (time driven, every step) and
//      recomputes its bias beta_j = ln(Pj + eps), written out on b_we;
//   2. for every pre-synaptic input i that spiked (event driven; inputs without
//      a spike are skipped) updates Zi, Ei, Pi and then the whole row i of the
//      synaptic matrix, each synapse followed by its weight, written out on w_we;
//   3. for every MCU j that spiked, updates the whole column j of the matrix
//      and its weights in the same way.
// step_done pulses when all of this is finished; busy is high meanwhile.  The
// order of the three phases and the one-synapse-at-a-time schedule are this
// design's own choices.  A synapse update takes 28 cycles from request to
// result; its weight leaves the 9-cycle log pipeline while the next synapse
// is already being updated, so back-to-back weights appear every 29 cycles
// (the coordinates w_i/w_j travel with the weight through a matching delay
// line).  The step ends only once the last weight has been written.
// syn_init clears all traces.
module mcu_updating_mode
  import bcpnn_pkg::*;
#(
  parameter int N_IN  = 10,
  parameter int N_MCU = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     syn_init,
  input  logic                     update_en,
  input  logic                     step_start,
  input  time_t                    curr_time,
  input  logic [N_IN-1:0]          spike_i_value,
  input  logic [N_MCU-1:0]         spike_j_value,
  output logic                     busy,
  output logic                     step_done,
  output logic                     w_we,
  output logic [$clog2(N_IN)-1:0]  w_i,
  output logic [$clog2(N_MCU)-1:0] w_j,
  output fx_t                      w_data,
  output logic                     b_we,
  output logic [$clog2(N_MCU)-1:0] b_j,
  output fx_t                      b_data
);
  localparam int IW = $clog2(N_IN);
  localparam int JW = $clog2(N_MCU);

  typedef enum logic [3:0] {
    T_IDLE, T_POST_REQ, T_POST_WAIT, T_PRE_SCAN, T_PRE_WAIT,
    T_ROW_REQ, T_COL_SCAN, T_COL_REQ, T_SYN_WAIT, T_DONE
  } tstate_e;
  tstate_e st;

  logic [N_IN-1:0]  si_q;
  logic [N_MCU-1:0] sj_q;
  time_t            t_q;
  logic [IW:0]      i_q;
  logic [JW:0]      j_q;
  logic             col_mode;

  wire [IW-1:0] i_idx = i_q[IW-1:0];
  wire [JW-1:0] j_idx = j_q[JW-1:0];

  // pre-synaptic vector
  logic pre_req, pre_busy, pre_done;
  fx_t  pre_z, pre_plog, pre_rd_z, pre_rd_plog;
  ep_t  pre_e, pre_p;
  time_t pre_rd_t;
  trace_vector #(.N(N_IN), .IS_POST(1'b0)) u_pre (
    .clk, .rst_n, .init(syn_init), .req(pre_req), .idx(i_idx), .spike(1'b1),
    .curr_time(t_q), .busy(pre_busy), .done(pre_done),
    .z_out(pre_z), .e_out(pre_e), .p_out(pre_p), .plog_out(pre_plog),
    .rd_idx(i_idx), .rd_z(pre_rd_z), .rd_plog(pre_rd_plog), .rd_t(pre_rd_t)
  );

  // post-synaptic vector
  logic post_req, post_busy, post_done;
  fx_t  post_z, post_plog, post_rd_z, post_rd_plog;
  ep_t  post_e, post_p;
  time_t post_rd_t;
  trace_vector #(.N(N_MCU), .IS_POST(1'b1)) u_post (
    .clk, .rst_n, .init(syn_init), .req(post_req), .idx(j_idx), .spike(sj_q[j_idx]),
    .curr_time(t_q), .busy(post_busy), .done(post_done),
    .z_out(post_z), .e_out(post_e), .p_out(post_p), .plog_out(post_plog),
    .rd_idx(j_idx), .rd_z(post_rd_z), .rd_plog(post_rd_plog), .rd_t(post_rd_t)
  );

  // synaptic matrix
  logic syn_req, syn_busy, syn_done;
  ep_t  eij, pij;
  fx_t  pij_log;
  synaptic_trace #(.N_IN(N_IN), .N_MCU(N_MCU)) u_syn (
    .clk, .rst_n, .init(syn_init), .req(syn_req), .i_idx, .j_idx,
    .curr_time(t_q), .zi_val(pre_rd_z), .ti_val(pre_rd_t), .zj_now(post_rd_z),
    .busy(syn_busy), .done(syn_done), .eij, .pij, .pij_log
  );

  // weight and bias
  logic [3:0] w_pending;   // weights still inside the log pipeline
  logic w_valid;
  fx_t  wij;
  weight_log u_w (.clk, .rst_n, .in_valid(syn_done), .pi_log(pre_rd_plog), .pj_log(post_rd_plog),
                  .pij_log, .out_valid(w_valid), .wij);
  logic b_valid;
  fx_t  bias;
  bias_log u_b (.clk, .rst_n, .in_valid(post_done), .pj_log(post_plog), .out_valid(b_valid),
                .bias_j(bias));

  assign pre_req  = (st == T_PRE_SCAN) && (i_q < (IW+1)'(N_IN)) && si_q[i_idx];
  assign post_req = (st == T_POST_REQ);
  assign syn_req  = (st == T_ROW_REQ) || (st == T_COL_REQ);
  assign busy     = (st != T_IDLE);

  // Step inputs are sampled when a step is accepted; they need no reset.
  always_ff @(posedge clk)
    if (st == T_IDLE && step_start && update_en && !syn_init) begin
      si_q <= spike_i_value;
      sj_q <= spike_j_value;
      t_q  <= curr_time;
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= T_IDLE;
      step_done <= 1'b0;
      i_q       <= '0;
      j_q       <= '0;
      col_mode  <= 1'b0;
    end else begin
      step_done <= 1'b0;
      unique case (st)
        T_IDLE: if (step_start && update_en && !syn_init) begin
          j_q  <= '0;
          st   <= T_POST_REQ;
        end
        T_POST_REQ:  st <= T_POST_WAIT;
        T_POST_WAIT: if (post_done) begin
          if (j_q == (JW+1)'(N_MCU - 1)) begin
            i_q <= '0;
            st  <= T_PRE_SCAN;
          end else begin
            j_q <= j_q + 1'b1;
            st  <= T_POST_REQ;
          end
        end
        T_PRE_SCAN: begin
          if (i_q == (IW+1)'(N_IN)) begin
            j_q <= '0;
            st  <= T_COL_SCAN;
          end else if (si_q[i_idx]) begin
            st <= T_PRE_WAIT;
          end else begin
            i_q <= i_q + 1'b1;
          end
        end
        T_PRE_WAIT: if (pre_done) begin
          j_q      <= '0;
          col_mode <= 1'b0;
          st       <= T_ROW_REQ;
        end
        T_ROW_REQ:  st <= T_SYN_WAIT;
        T_COL_REQ:  st <= T_SYN_WAIT;
        T_SYN_WAIT: if (syn_done) begin
          if (!col_mode) begin
            if (j_q == (JW+1)'(N_MCU - 1)) begin
              i_q <= i_q + 1'b1;
              st  <= T_PRE_SCAN;
            end else begin
              j_q <= j_q + 1'b1;
              st  <= T_ROW_REQ;
            end
          end else begin
            if (i_q == (IW+1)'(N_IN - 1)) begin
              j_q <= j_q + 1'b1;
              st  <= T_COL_SCAN;
            end else begin
              i_q <= i_q + 1'b1;
              st  <= T_COL_REQ;
            end
          end
        end
        T_COL_SCAN: begin
          if (j_q == (JW+1)'(N_MCU)) begin
            st <= T_DONE;
          end else if (sj_q[j_idx]) begin
            i_q      <= '0;
            col_mode <= 1'b1;
            st       <= T_COL_REQ;
          end else begin
            j_q <= j_q + 1'b1;
          end
        end
        T_DONE: if (w_pending == '0) begin
          step_done <= 1'b1;
          st        <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end

  // weight and bias write-out
  logic [JW-1:0] bias_j_q;
  always_ff @(posedge clk) if (post_done) bias_j_q <= j_idx;

  // The weight pipeline runs alongside the next synapse update, so the
  // synapse coordinates travel with it through a delay line of the same
  // length; w_pending counts weights still in flight.
  localparam int W_LAT = 9;
  logic [IW+JW-1:0] w_idx_d [W_LAT];
  always_ff @(posedge clk) begin
    w_idx_d[0] <= {i_idx, j_idx};
    for (int k = 1; k < W_LAT; k++) w_idx_d[k] <= w_idx_d[k-1];
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) w_pending <= '0;
    else        w_pending <= w_pending + 4'(syn_done) - 4'(w_valid);
  end

  assign w_we   = w_valid;
  assign {w_i, w_j} = w_idx_d[W_LAT-1];
  assign w_data = wij;
  assign b_we   = b_valid;
  assign b_j    = bias_j_q;
  assign b_data = bias;
endmodule
