// trace_engine: the two-adder, two-multiplier datapath that evaluates one lazy
// trace update.  Given the state at the last update (Z0, E0, P0), the factors
// ez = exp(-dt/tau_z), ee = exp(-dt/tau_e), ep = exp(-dt/tau_p*) and the spike
// amplitude s_in it computes
//   Z' = Z0*ez + s_in
//   E' = E0*ee + a*Z0*(ez - ee)
//   P' = P0*ep + ab*Z0*(ez - ep) + (E0 - a*Z0)*c*(ee - ep)
//   P_log = P' + eps                 (argument of the later logarithm)
// In synaptic mode (syn = 1) Z0 is the stored product Zi*Zj and the engine also
// forms zij_new = (zi_val * ezi) * zj_now, the product to store for the next
// update.  The equations and the resource count (two adders, two multipliers,
// independent steps issued together, dependent ones in sequence) follow the
// design; the order of the six steps below is this design's own schedule:
//   S1: E0*ee, a*Z0,      ez-ee,      ez-ep
//   S2: aZ0*(ez-ee), P0*ep, ee-ep,    E0-aZ0
//   S3: Z0*ez, ab*Z0,     E'
//   S4: (E0-aZ0)*c, abZ0*(ez-ep), Z', P0ep+eps
//   S5: dc*(ee-ep), zi_val*ezi, P0ep+abzx, (P0ep+eps)+abzx
//   S6: P', P_log, (syn) zi_now*zj_now
// Operands are held for a whole step and results are captured when the slowest
// unit of the step is done, so a multiply step takes 4 cycles and an add-only
// step 2.  start is a one-cycle pulse with all inputs valid in that cycle (they
// are registered); done pulses with the results 23 cycles later (25 in
// synaptic mode).
module trace_engine
  import bcpnn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic syn,
  input  fx_t  z0, e0, p0,
  input  fx_t  ez, ee, ep,
  input  fx_t  s_in,
  input  fx_t  coef_a, coef_ab, coef_c, eps,
  input  fx_t  zi_val, ezi, zj_now,
  output logic busy,
  output logic done,
  output fx_t  z_new, e_new, p_new, p_log, zij_new
);
  localparam int MUL_LAT = 3;
  localparam int ADD_LAT = 1;

  typedef enum logic [2:0] {ST_IDLE, ST_S1, ST_S2, ST_S3, ST_S4, ST_S5, ST_S6} step_e;
  step_e step;
  logic [2:0] cnt;

  // registered inputs
  fx_t r_z0, r_e0, r_p0, r_ez, r_ee, r_ep, r_s, r_a, r_ab, r_c, r_eps, r_zi, r_ezi, r_zj;
  logic r_syn;
  // temporaries
  fx_t e0ee, az, d_zee, d_zep, d_eep, t_az, p0ep, dd, z0ez, abz, dc, abzx, pe, q, qe, dcx, zi_now;

  fx_t m1a, m1b, m2a, m2b, a1a, a1b, a2a, a2b;
  fx_t m1p, m2p, a1s, a2s;

  fx_multiplier u_mul1 (.clk, .a(m1a), .b(m1b), .p(m1p));
  fx_multiplier u_mul2 (.clk, .a(m2a), .b(m2b), .p(m2p));
  fx_adder      u_add1 (.clk, .a(a1a), .b(a1b), .s(a1s));
  fx_adder      u_add2 (.clk, .a(a2a), .b(a2b), .s(a2s));

  // operand selection per step
  always_comb begin
    m1a = '0; m1b = '0; m2a = '0; m2b = '0;
    a1a = '0; a1b = '0; a2a = '0; a2b = '0;
    unique case (step)
      ST_S1: begin
        m1a = r_e0;  m1b = r_ee;  m2a = r_a;  m2b = r_z0;
        a1a = r_ez;  a1b = -r_ee; a2a = r_ez; a2b = -r_ep;
      end
      ST_S2: begin
        m1a = az;    m1b = d_zee; m2a = r_p0; m2b = r_ep;
        a1a = r_ee;  a1b = -r_ep; a2a = r_e0; a2b = -az;
      end
      ST_S3: begin
        m1a = r_z0;  m1b = r_ez;  m2a = r_ab; m2b = r_z0;
        a1a = e0ee;  a1b = t_az;
      end
      ST_S4: begin
        m1a = dd;    m1b = r_c;   m2a = abz;  m2b = d_zep;
        a1a = z0ez;  a1b = r_s;   a2a = p0ep; a2b = r_eps;
      end
      ST_S5: begin
        m1a = dc;    m1b = d_eep; m2a = r_zi; m2b = r_ezi;
        a1a = p0ep;  a1b = abzx;  a2a = pe;   a2b = abzx;
      end
      ST_S6: begin
        m1a = zi_now; m1b = r_zj;
        a1a = q;     a1b = dcx;   a2a = qe;   a2b = dcx;
      end
      default: ;
    endcase
  end

  logic [2:0] step_len;
  always_comb begin
    if (step == ST_S6 && !r_syn) step_len = 3'(ADD_LAT);
    else                         step_len = 3'(MUL_LAT);
  end
  wire last = (cnt == step_len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= ST_IDLE;
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (step == ST_IDLE) begin
        cnt <= '0;
        if (start) step <= ST_S1;
      end else if (last) begin
        cnt <= '0;
        if (step == ST_S6) begin
          step <= ST_IDLE;
          done <= 1'b1;
        end else begin
          step <= step_e'(step + 3'd1);
        end
      end else begin
        cnt <= cnt + 3'd1;
      end
    end
  end

  assign busy = (step != ST_IDLE);

  always_ff @(posedge clk) begin
    if (step == ST_IDLE && start) begin
      r_z0 <= z0;  r_e0 <= e0;  r_p0 <= p0;
      r_ez <= ez;  r_ee <= ee;  r_ep <= ep;  r_s <= s_in;
      r_a  <= coef_a; r_ab <= coef_ab; r_c <= coef_c; r_eps <= eps;
      r_zi <= zi_val; r_ezi <= ezi; r_zj <= zj_now; r_syn <= syn;
    end
    if (last) begin
      unique case (step)
        ST_S1: begin e0ee <= m1p; az <= m2p; d_zee <= a1s; d_zep <= a2s; end
        ST_S2: begin t_az <= m1p; p0ep <= m2p; d_eep <= a1s; dd <= a2s; end
        ST_S3: begin z0ez <= m1p; abz <= m2p; e_new <= a1s; end
        ST_S4: begin dc <= m1p; abzx <= m2p; z_new <= a1s; pe <= a2s; end
        ST_S5: begin dcx <= m1p; zi_now <= m2p; q <= a1s; qe <= a2s; end
        ST_S6: begin p_new <= a1s; p_log <= a2s; zij_new <= r_syn ? m1p : '0; end
        default: ;
      endcase
    end
  end
endmodule
