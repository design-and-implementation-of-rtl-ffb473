# A BCPNN hypercolumn accelerator in SystemVerilog

The Bayesian Confidence Propagation Neural Network (BCPNN) learns by low-pass
filtering spikes through three stages of exponential traces. The **Z** trace
is the fastest, then **E**, then the slow **P**. It turns the P traces into
weights and biases through logarithms:

    beta_j = ln(Pj + eps)
    w_ij   = ln((Pij + eps^2) / ((Pi + eps)(Pj + eps)))

Simulating the traces step by step costs a multiply-add for every synapse in
every millisecond. That is the bottleneck of a hypercolumn (HCU), which has
thousands of incoming connections and up to a hundred minicolumns (MCUs).

This RTL accelerates one HCU with two ideas:

* **Lazy updates.** A trace only changes when a spike reaches it. Between
  spikes, it decays in closed form. A trace can therefore stay untouched
  until the next spike, and then jump forward over the elapsed time `dt` in
  one go. That jump needs only `exp(-dt/tau)` for five time constants. `dt`
  is an integer number of 1 ms steps, so all five values come from one
  read of a small ROM.
* **Two modes.** In training mode (`update_en = 1`), each time step updates
  the traces and emits new weights and biases. In inference mode
  (`update_en = 0`), each time step advances every MCU's synaptic current,
  membrane potential and soft-max activation, using the weights learned in
  training.

The default size is 10 incoming connections and 16 MCUs. Both are top-level
parameters (`N_IN`, `N_MCU`).

## The lazy trace update

For a unit with a spike train `S`, the three traces jump from their values
at the last update (`Z0`, `E0`, `P0`) to their values `dt` steps later as
follows:

    Z' = Z0*ez + S
    E' = E0*ee + a*Z0*(ez - ee)
    P' = P0*ep + a*b*Z0*(ez - ep) + (E0 - a*Z0)*c*(ee - ep)

The symbols are:

* `ez`, `ee` and `ep` are `exp(-dt/tau)` for `tau_z`, `tau_e` and
  `tau_p*`.
* `a = tau_z/(tau_z - tau_e)`, `b = tau_z/(tau_z - tau_p*)` and
  `c = tau_e/(tau_e - tau_p*)` are constants computed at elaboration.

A synapse obeys the same equations, with `Z0` replaced by the product
`Zi*Zj` at its last update. Because `Zi*Zj` decays with `1/tau_zij =
1/tau_zi + 1/tau_zj`, one more exponential covers it.

**`exp_result_bram`** holds the five factors for `dt = 0..1023`. They are
packed into one 150-bit word of five 1.1.28 values: `tau_zi`, `tau_zj`,
`tau_zij`, `tau_e` and `tau_p*`, with `tau_zi` in the top bits. The table
is computed at elaboration from the constants in `bcpnn_pkg`, so changing a
time constant needs no data file. A gap longer than 1023 steps is read as
1023: after that long every factor is essentially zero, and so is the
error.

**`trace_engine`** evaluates one lazy update on two multipliers and two
adders. The equations are split into independent products and sums, and
each of six steps issues up to two multiplies and two adds:

| step | multiplier 1 | multiplier 2 | adder 1 | adder 2 |
|------|--------------|--------------|---------|---------|
| S1 | E0*ee | a*Z0 | ez-ee | ez-ep |
| S2 | aZ0*(ez-ee) | P0*ep | ee-ep | E0-aZ0 |
| S3 | Z0*ez | ab*Z0 | E' = E0ee + aZ0(ez-ee) | |
| S4 | (E0-aZ0)*c | abZ0*(ez-ep) | Z' = Z0ez + S | P0ep + eps |
| S5 | ...*(ee-ep) | Zi*ezi (synapse only) | P0ep + abZ0(ez-ep) | (P0ep+eps) + ... |
| S6 | Zi(now)*Zj (synapse only) | | P' | P' + eps |

Each step waits for the slower of its units. The multiplier has a latency
of 3 and the adder a latency of 1. New values are ready 23 cycles after
`start`, or 25 cycles for a synapse, where S6 also forms the new `Zi*Zj`.

**Keeping a synapse consistent without touching its row.**

* The pre trace `Zi` is updated only when input `i` spikes. Each pre entry
  also stores its last-update time.
* When column `j` is updated because MCU `j` spiked, the synapse needs the
  current `Zi`. It takes the stored `Zi` and decays it with the second read
  port of the exponential table, at `curr_time - t_i`.
* The post traces are updated every time step (time driven), so `Zj` is
  always current.
* The synapse then stores the new `Zi*Zj` and its own time stamp.

## A training time step

`mcu_updating_mode` handles one pulse of `step_start` in three phases:

1. **Post vector.** Every post entry `j` is updated with `S = spike_j_value[j]`.
   Its bias `ln(Pj + eps)` is recomputed and streamed out on `b_we/b_j/b_data`.
2. **Rows.** For every input `i` with `spike_i_value[i] = 1`, the pre trace
   is updated. Then every synapse in row `i` is updated, and a new weight
   follows each one on `w_we/w_i/w_j/w_data`. Silent inputs are skipped.
3. **Columns.** For every MCU `j` that spiked, every synapse in column `j`
   is updated in the same way.

A memory entry is written only when its engine finishes. Synapses are
processed one at a time. One synapse update takes 28 cycles from request
to result. Its weight then spends 9 cycles in the log pipeline while the
next synapse is already being updated. Weights therefore come out every 29
cycles, and a step ends only after the last weight has left the pipeline.

A post entry takes 26 cycles. The bias pipeline (5 cycles) runs alongside.

With `r` spiking inputs and `k` spiking MCUs, a step costs about
`27*N_MCU + r*(27 + 29*N_MCU) + k*29*N_IN + 10` cycles.

**Weights and biases** are computed in floating point, as in the original
accelerator.

* `weight_log`:
  1. multiply `(Pi+eps)(Pj+eps)` in fixed point;
  2. convert both terms to IEEE single (`fixed2float`);
  3. divide (`float_divide`);
  4. take the natural log (`float_log`);
  5. convert back to fixed point (`float2fixed`).

  It is fully pipelined, with a latency of 9.
* `bias_log` is the same chain without the division, with a latency of 5.

Each trace entry keeps `P + eps`, so the log stages need no extra adder.

## An inference time step

`mcu_inference_mode` advances every MCU `j` by one explicit-Euler step with
`dt = 1 ms`:

    acc    = sum_i w_ij * S_i
    s_syn += (acc - s_syn) / tau_zi
    s_j    = beta_j + s_syn + I_j
    m_j   += (s_j - m_j) / tau_m
    e_j    = exp(gamma_m * m_j)

After all MCUs are done, a second pass normalises:

* If `sum_k e_k > 1`, then `o_j = e_j / sum`. The division is done as one
  fixed-point reciprocal per step.
* Otherwise `o_j = e_j`.
* In both cases `r_j = o_j * r_max`.

Results stream out on `out_valid/out_mcu/out_oj/out_rj`. They can also be
read at any time through `mcu_id -> rd_oj/rd_rj`.

The datapath uses three adders and two multipliers:

* Adder 3 accumulates the weighted spikes.
* Adder 2 forms `beta_j + I_j`.
* Adder 1 and the multipliers do the Euler updates.

The exponential uses `fixed2float -> float_exp -> float2fixed`. `float_exp`
computes `2^(x*log2 e)` from a 257-entry table of `2^(k/256)` with linear
interpolation.

Per-MCU state (`s_syn, s, m, e, o`, 5 x 33 bits) is kept in `mcu_inf_bram`.
Weights are kept in `weight_bram`. Both are written from the training half.

A step takes `N_MCU*(N_IN + 39) + 2` cycles, which is 786 at the default
size.

## Number formats and constants (`bcpnn_pkg`)

| quantity | format |
|----------|--------|
| datapath, Z, P+eps, weights, biases, inference state | 33-bit signed 1.4.28 (range ±16) |
| E, P, exponential factors | 30-bit signed 1.1.28 (range ±2) |
| log / divide / exp | IEEE-754 single |
| time | 40-bit step count |

The multiplier keeps bits [60:28] of its 66-bit product, which truncates
toward minus infinity. E and P are saturated to ±2 on write-back.
`float2fixed` saturates at ±16.

The constants are:

* `eps = 1.0`. In the original design's training waveforms, `P_log` is
  always exactly 1.0 above `P`.
* `tau_zi = tau_zj = 10` and `tau_zij = 5`.
* `tau_e = 20`, `tau_p* = 100` and `tau_m = 10`, all in time steps.
* `gamma_m = 1`.
* `r_max = 0.1` spikes per step.

No values were published for the time constants, `gamma_m` or `r_max`.
They are placeholders; edit them in the package.

## Interface of `bcpnn_accelerator`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `update_en` | in | 1 = training, 0 = inference |
| `syn_init` / `const_init` | in | one-cycle clear of all training traces / of the MCU state and rates (the weight and bias memories are not cleared) |
| `step_start` | in | one-cycle pulse: run one time step in the selected mode (ignored while `busy`) |
| `curr_time[39:0]` | in | time of a training step (only differences matter) |
| `spike_i_value[N_IN]`, `spike_j_value[N_MCU]` | in | pre and post spikes of a training step |
| `spike_connections[N_IN]`, `ext_in[N_MCU]` | in | input spikes and external input `I_j` of an inference step |
| `busy`, `step_done` | out | step running; pulse at its end |
| `w_we, w_i, w_j, w_data` | out | each new weight, as it is computed |
| `b_we, b_j, b_data` | out | each new bias |
| `out_valid, out_mcu, out_oj, out_rj` | out | each activation and rate of an inference step |
| `mcu_id` -> `rd_oj`, `rd_rj` | in/out | read-out of one MCU (combinational) |

How to drive it:

* Hold the spike vectors and `curr_time` at the `step_start` pulse. They are
  sampled there.
* Wait for `step_done` before the next step, or before changing
  `update_en`.
* `curr_time` must not go backwards.
* The weights and biases streamed out during training are also written
  into the inference memories. Inference therefore always uses the latest
  learned values.
* The weight memory has no reset. A weight is defined once its synapse has
  been updated, that is, after its input or its MCU has spiked in training.
  Every bias is written in the first training step.

## Module map

| module | role |
|--------|------|
| `bcpnn_accelerator` | top; training and inference halves |
| `mcu_updating_mode` | training sequencer |
| `trace_vector` | pre or post (Z, E, P, P+eps, t_last) memory + one engine |
| `synaptic_trace` | N_IN x N_MCU (ZiZj, E, P, t_last) memory + one engine |
| `trace_engine` | 2-adder / 2-multiplier lazy-update datapath |
| `exp_result_bram` | 1024 x 150 ROM of exp(-dt/tau) |
| `weight_log`, `bias_log` | log chains |
| `mcu_inference_mode` | inference core |
| `fx_adder`, `fx_multiplier` | 33-bit arithmetic (latency 1 and 3) |
| `fixed2float`, `float2fixed`, `float_divide` | conversions and division (latency 1) |
| `float_log`, `float_exp` | table-plus-interpolation log and exp (latency 3) |

## Where this design departs from the original accelerator

* **Cycle counts.**
  * The original needs 22 cycles per weight update; this design needs 29.
    It runs one synapse at a time, and its six-step trace schedule waits
    for the full multiplier latency at every step. The pre, post and
    synaptic trace units each have their own adders and multipliers, as in
    the original, but here they work one after another.
    The original overlaps them.
  * The original needs 36 cycles per MCU inference; this design needs
    `N_IN + 39`.
  * The 200 MHz clock of the original has not been checked here: no FPGA
    timing run was done.
* **Log, divide and exp** are small table-based or plain-logic units, not
  vendor floating-point cores.
  * log is accurate to about 3e-6 absolute and exp to about 2e-6 relative.
  * Division truncates.
  * Denormals, infinities and NaN are not handled.
* **The weight uses the stored `Pi + eps`.** It is not brought up to the
  current time when a column update touches input `i`, because the pre trace
  is only updated on pre spikes.
* **Own additions.** The saturation of E and P, the clamp of `dt` at 1023
  and the clear pulses are this design's choices.
* **Not built.** The reuse variants that share adders and multipliers
  between the three trace units (fewer DSPs, 22-30 cycles) are
  alternatives to the main design and are not built. Each trace unit here
  has its own two adders and two multipliers.
* **Capacity.** The number formats assume traces below 2. With dense
  spiking (Z well above 1 for long periods), the synaptic E and P saturate
  and the weights drift from the exact rule. The testbenches therefore use
  sparse spikes (about 1 in 12 per step at full size).
* **Scale.** A maximum-size hypercolumn of 10,000 inputs x 100 MCUs is a
  parameter change. However, it needs about 166 Mbit of synaptic state,
  far more than on-chip RAM holds, and nothing here pages it to external
  memory.

## Simulation

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M`.

The testbenches compare against `bcpnn_ref_pkg`, which holds a
double-precision model of the lazy learning rule (with the same `dt` clamp)
and of the inference equations. They also check the latencies given above.

`tb_bcpnn_accelerator` runs the top at its default size. It performs:

* 40 training steps, including a gap of 1200 steps;
* 40 inference steps, with normalised and unnormalised activations;
* a switch back to training, and then to inference again.

It checks every weight (tolerance 1e-3) and bias (1e-4) against the model.
It checks every activation and rate against the inference model, fed with
the weights the hardware learned. It counts row updates, column updates,
skipped inputs, saturated gaps and mode switches, and fails if any of them
never occurs.

`tb_precision` runs three single values through the bias, weight and
activation chains: a bias of 0.60773897, a weight of -0.60796681 and an
activation of e^2 = 7.38905610. These are the reference values of the
original accelerator's accuracy check. The measured errors are 2.4e-7,
1.2e-6 and 5.8e-6. The original fixed-point hardware reached about 3e-7,
3e-7 and 1e-7: its log and exp came from vendor cores, while this design
uses its own tables.

With Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
        -y rtl -y tb --top-module tb_bcpnn_accelerator \
        rtl/bcpnn_pkg.sv tb/bcpnn_ref_pkg.sv tb/tb_bcpnn_accelerator.sv
    ./obj_dir/Vtb_bcpnn_accelerator

Replace the top module and the last file to run any other testbench. The
full-size test takes a few seconds.
