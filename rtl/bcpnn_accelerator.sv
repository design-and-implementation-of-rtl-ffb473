// bcpnn_accelerator: BCPNN training and inference accelerator for one
// hypercolumn of N_MCU minicolumns with N_IN incoming connections.
// Two halves share the hypercolumn's weights and biases:
//   mcu_updating_mode   (update_en = 1) runs the learning rule: lazy updates
//                        of the pre-, post-synaptic and synaptic traces and the
//                        logarithmic weight and bias computations; every new
//                        weight and bias is written into the inference half;
//   mcu_inference_mode  (update_en = 0) advances the MCUs' synaptic current,
//                        support and membrane potential and computes their
//                        soft-winner-take-all activation and firing rate.
// Each time step the host raises step_start for one cycle with curr_time and
// the spike vectors (spike_i_value / spike_j_value in training,
// spike_connections and ext_in in inference) and waits for step_done.
// syn_init clears the training state, const_init the MCU state.  The split
// into the two modes and their selection by update_en follow the design; the
// step handshake and the write-through of weights and biases are this design's
// own.  Training-side weight and bias writes are also visible on w_*/b_*.
module bcpnn_accelerator
  import bcpnn_pkg::*;
#(
  parameter int N_IN  = 10,
  parameter int N_MCU = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     update_en,
  input  logic                     syn_init,
  input  logic                     const_init,
  input  logic                     step_start,
  input  time_t                    curr_time,
  input  logic [N_IN-1:0]          spike_i_value,
  input  logic [N_MCU-1:0]         spike_j_value,
  input  logic [N_IN-1:0]          spike_connections,
  input  fx_t                      ext_in [N_MCU],
  input  logic [$clog2(N_MCU)-1:0] mcu_id,
  output fx_t                      rd_oj,
  output fx_t                      rd_rj,
  output logic                     busy,
  output logic                     step_done,
  output logic                     w_we,
  output logic [$clog2(N_IN)-1:0]  w_i,
  output logic [$clog2(N_MCU)-1:0] w_j,
  output fx_t                      w_data,
  output logic                     b_we,
  output logic [$clog2(N_MCU)-1:0] b_j,
  output fx_t                      b_data,
  output logic                     out_valid,
  output logic [$clog2(N_MCU)-1:0] out_mcu,
  output fx_t                      out_oj,
  output fx_t                      out_rj
);
  logic upd_busy, upd_done, inf_busy, inf_done;

  mcu_updating_mode #(.N_IN(N_IN), .N_MCU(N_MCU)) u_update (
    .clk, .rst_n, .syn_init, .update_en, .step_start(step_start && !inf_busy),
    .curr_time, .spike_i_value, .spike_j_value,
    .busy(upd_busy), .step_done(upd_done),
    .w_we, .w_i, .w_j, .w_data, .b_we, .b_j, .b_data
  );

  mcu_inference_mode #(.N_IN(N_IN), .N_MCU(N_MCU)) u_infer (
    .clk, .rst_n, .const_init, .update_en, .step_start(step_start && !upd_busy),
    .spike_connections, .ext_in,
    .w_we, .w_i, .w_j, .w_data, .b_we, .b_j, .b_data,
    .mcu_id, .rd_oj, .rd_rj,
    .busy(inf_busy), .step_done(inf_done),
    .out_valid, .out_mcu, .out_oj, .out_rj
  );

  assign busy      = upd_busy | inf_busy;
  assign step_done = upd_done | inf_done;
endmodule
