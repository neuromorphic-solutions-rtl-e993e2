# Spiking neural network ECG classifier with on-chip STDP

This is a small spiking neural network (SNN) in synthesizable SystemVerilog. It sorts
electrocardiogram (ECG) records into *normal* and *abnormal*. Each record is a 35-bit word,
already reduced from a 10-second ECG trace by wavelet filtering and thresholding in software.
The network learns on chip: spike-timing-dependent plasticity (STDP) adjusts the synapses of
two Izhikevich output neurons while training neurons force the correct output to fire. After
training, a record is classified by which output neuron fires.

The architecture comes from a published FPGA design: its neuron count, regular-spiking
Izhikevich neuron, per-neuron synapse RAM with an input-align stage, STDP unit
(address counter, increment/decrement select, weight counter), AER bus and the
record-sequencing scheme. It was evaluated on MIT-BIH records. The time-step scheduling,
fixed-point arithmetic, rate coding and several widths are this implementation's own; they
are listed under [Departures and own choices](#departures-and-own-choices).

## Network organisation

| Neurons | Role | Implementation |
|---|---|---|
| 0 … 34  | input neurons, one per record bit | `input_neurons`: a spike register |
| 35      | training neuron, normal class | `training_neurons` |
| 36      | training neuron, abnormal class | `training_neurons` |
| 37      | output neuron "normal" | `izh_neuron` + `stdp` |
| 38      | output neuron "abnormal" | `izh_neuron` + `stdp` |

Both output neurons receive a synapse from each of neurons 0 … 36, 37 in all. The 35 input
synapses are plastic, with weights starting at 0. The training synapses are fixed. At start-up
the controller writes `W_TRAIN` (1000) into synapse 35 of neuron 37 and synapse 36 of neuron 38.
The crossed training synapses stay 0. So during training exactly one output neuron is made to
fire: the one for the class being shown.

```
             +-------------+   Digit    +---------------+ spikes 0..34 +---------+
 rec_* ----->|data_sequencer|---------->| input_neurons |------------->|         |  aer_addr
 image_signal+-------------+    (mux)   +---------------+              | aer_bus |--------+
 digit_noise ------------------^                                       |         |        |
                               +-------------------+ spikes 35,36 ---->|         |        |
 image_signal ---------------->| training_neurons  |                   +---------+        |
                               +-------------------+                                      |
         +---------------------------------------------------------------------+---------+
         v                                                                     v
  +--------------------------+  spike 37                       +--------------------------+
  | izh_neuron 37            |--------+                        | izh_neuron 38            |--+
  |  synapse_ram  input_align|        |                        |  synapse_ram input_align |  |
  |  izh_core                |<--+    |                        |  izh_core                |<-+--+
  +--------------------------+   |WE/Addr/Weight              +--------------------------+  |  |
                           +-----+--------+                                  +-------------+  |
                           |  stdp (37)   |<-- pre spikes 0..34 -->         |  stdp (38)   |<-+
                           +--------------+                                  +--------------+
                  snn_ctrl sequences all of the above, one time step at a time
```

## One time step

Spikes are processed in discrete time steps. The controller `snn_ctrl` runs each step
through four phases:

1. **SPIKE** (1 clock): the input and training neurons produce this step's spikes.
2. **AER** (K + 2 clocks for K presynaptic spikes, 3 for none): `aer_bus` captures the
   37-bit spike vector and sends one address per clock, lowest index first. Each output neuron
   reads the weight at that address from its RAM and adds it to its input current. The
   neurons' `v`/`u` state is frozen meanwhile (`aer_halt`).
3. **UPDATE** (1 clock): `EN` goes to both neurons. Each neuron takes one Euler step with the
   summed current, then clears the sum.
4. **LEARN** (37 clocks): `EN_Addr` goes to both STDP units. Each unit shifts its spike
   histories and scans synapses 0 … 34, one per clock, writing every changed weight into its
   neuron's RAM. `step_done` is high in the last clock.

A step therefore takes **K + 41 clocks** for K ≥ 1 presynaptic spikes and 42 clocks for none.
The full-size testbench checks this for every step. Because the AER phase serialises the
spikes, a step with many simultaneous spikes simply takes longer, and no event is lost.

After reset the controller spends 37 clocks in **INIT**, writing every synapse RAM entry
(0, or `W_TRAIN` at the training synapses), and then raises `ready`. Records can be loaded
at any time through the `rec_*` port.

## The output neuron

`izh_neuron` holds the three pieces of one output neuron:

* **`synapse_ram`**: a 37 × 11-bit distributed RAM. The synchronous write port (`we`, `a`,
  `di`) belongs to the STDP unit, or to the controller during INIT. The asynchronous read
  port (`dpra`, `dpo`) is addressed by the AER bus.
* **`input_align`**: accumulates the weights of all AER events of a step into the current
  `I` (20-bit signed) and limits `I` below at **−140**. Without the limit, a strongly
  negative sum would drive `v` far down, and the quadratic term would then throw it back
  above threshold: a spike the inputs never asked for. `clamped` shows when the limit acts.
* **`izh_core`**: the Izhikevich model in the regular-spiking regime

  ```
  v' = 0.04 v² + 5 v + 140 − u + I        u' = a (b v − u)
  if v ≥ 30 mV:  v ← c,  u ← u + d        a = 0.02, b = 0.2, c = −65, d = 8
  ```

  `v` and `u` are signed Q16.16 in mV. One `en` pulse performs a forward-Euler step of
  Δt = 2^−DT_SHIFT ms, 0.25 ms by default. The arithmetic uses 64-bit products shifted back
  by 16, 0.04 ≈ 2621/65536, a ≈ 1311/65536 and b ≈ 13107/65536, and `v` has a lower limit
  of −140 mV. The spike test uses the *updated* `v`. `spike_out` is registered and holds
  until the next step. Reset puts the neuron at rest: v = −65, u = b·v.

The step size matters. At Δt = 0.5 ms, a current held at the −140 limit makes the Euler
update undershoot and rebound into a false spike within a few steps. At 0.25 ms it does not,
and the end-to-end test checks this.

## STDP learning unit

`stdp` is the part of the design that needs the most explanation. It implements the
exponential STDP window

```
ΔW(x) = A+ · exp(−x / τ+)   for x > 0  (pre before post: potentiation)
ΔW(x) = −A− · exp( x / τ−)  for x ≤ 0  (post before pre: depression)
```

in integer hardware, in time steps rather than milliseconds. Its sub-blocks:

* **Spike histories.** Each synapse has a `WIN_PRE`-bit (4) shift register of its
  presynaptic spikes, and the unit has one `WIN_POST`-bit (4) register of the output
  neuron's spikes. Bit 0 is the current step. They shift once per step, on `EN_Addr`.
* **`stdp_addr_cnt`**: on `EN_Addr` it counts `Syn_Addr` through 0 … 34, one per clock, then
  pulses `done`. An input multiplexer selects that synapse's pre history.
* **`stdp_id_sel`** (combinational), with k the distance in steps:
  * **Incr** when the output neuron fires now and the synapse's neuron fired k = 0 … 3 steps
    ago. The magnitude is `A_PLUS >> (k >> TAU_PLUS_LOG2)`: 1, 1, 0, 0 with the defaults.
    The nearest earlier pre spike counts.
  * **Decr** when the synapse's neuron fires now, the output neuron does not, and it fired
    k = 1 … 3 steps ago. The magnitude is `A_MINUS >> (k >> TAU_MINUS_LOG2)`: 2, 1, 1.
  * A coincident pre and post spike (k = 0) counts as potentiation.
  * Halving every 2^TAU_LOG2 steps is the integer stand-in for the exponential decay. A
    magnitude of 0 means no change.
* **`stdp_weight_cnt`**: keeps a copy of all 35 weights (11-bit signed, reset to 0) and adds
  or subtracts the magnitude, saturating at +1023 / −1024. When `EN` is high and the weight
  changes, it issues a registered write (`WE`, `Addr`, `Weight`) into the neuron's RAM. The
  RAM is only a mirror of these counters, so the unit needs no read path from it.

With the defaults, a presynaptic spike one step before a postsynaptic one raises the weight
from 0 to 1, and a postsynaptic spike one step before a presynaptic one lowers it from 0 to
−2. These are the two single-pair cases the original design demonstrates, and `tb_stdp`
reproduces both.

In training, the record's active inputs fire at step phase 0. The class's training neuron
fires at phase `TRAIN_OFFSET` (1) and its output neuron fires in the same step. So the active
inputs of that output neuron are potentiated (k = 1). Inputs that fire while the wrong output
neuron was recently active are depressed. Across 10 records per class, the weights come to
favour the bit positions typical of each class.

## AER bus

`aer_bus` turns the spike vector of one step into a sequence of addresses, because the bus
can carry only one spike per clock. `load` captures the vector. Then each clock sends the
lowest pending address with `aer_valid`, keeping `halt` high, until `done`. `multi` flags a
step with more than one simultaneous spike: the case in which the neurons had to be halted.
With K spikes, `done` comes K + 1 clocks after `load`, and 2 clocks after it when there are
none.

## Data insertion and operating modes

`data_sequencer` holds 10 normal and 10 abnormal records and two 4-bit pointers. A rising
edge of `image_signal[0]` advances `n_counter`, and a rising edge of `image_signal[1]`
advances `a_counter`. Each wraps from 9 to 0. The record at the pointer appears on `Digit`,
registered, one clock after the edge. For `image_signal` 0 or 3, `Digit` keeps the record it
last showed. The modes:

| `image_signal` | mode | input neurons see | training neuron |
|---|---|---|---|
| 1 | train normal   | normal record `n_counter`   | 35 fires |
| 2 | train abnormal | abnormal record `a_counter` | 36 fires |
| 0 | test           | `digit_noise` | none |
| 3 | not used       | the last `Digit` | none |

`en_stdp` enables learning independently of the mode. Input neurons fire a record's 1-bits
once every `IN_PERIOD` (8) steps, at phase 0. This gap lets an output neuron recover between
presentations and keeps successive pairs apart in the 4-step STDP window.

## Departures and own choices

* **Address width.** The original block diagram labels the synapse and AER address buses 3 bits
  wide; its STDP timing demonstration uses 5 bits. Neither addresses 37 synapses, so all neuron
  addresses here are 6 bits.
* **Step scheduling** (`snn_ctrl`), the clock counts above, and the start-up RAM load: the
  original design does not describe them.
* **Fixed-point format, Euler step size and the −140 mV floor on `v`**: own choices.
* **STDP window** of 4 steps, τ as a power-of-two halving, per-synapse pre histories, and the
  weight counters' private weight copy: own choices. A+ = 1 and A− = 2 are matched to the
  original's demonstration.
* **Training neurons** fire a fixed delay after the inputs through a fixed synapse of weight
  1000. The original only names them. The weight is large because `u` builds up while a
  neuron fires repeatedly, so a weak kick stops working after a few presentations.
* **Records** are loaded through a write port. In the original they are constants in the
  top-level design. The pointer advances on the first rising edge, so record 1 is shown first.
* **Not built:** the ECG preprocessing (two rounds of Daubechies wavelet transform,
  normalisation and binarisation), which the original runs in software before the hardware.

## Files

| File | Contents |
|---|---|
| `rtl/snn_pkg.sv` | sizes, types, the step-phase enum |
| `rtl/snn_top.sv` | the whole network |
| `rtl/snn_ctrl.sv` | step controller |
| `rtl/izh_neuron.sv`, `synapse_ram.sv`, `input_align.sv`, `izh_core.sv` | output neuron |
| `rtl/stdp.sv`, `stdp_addr_cnt.sv`, `stdp_id_sel.sv`, `stdp_weight_cnt.sv` | STDP unit |
| `rtl/aer_bus.sv` | AER serialiser |
| `rtl/input_neurons.sv`, `training_neurons.sv`, `data_sequencer.sv` | spike sources and record store |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_snn_top_full.sv` | complete train-and-test run at default parameters |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb rtl/snn_pkg.sv tb/tb_snn_top_full.sv --top-module tb_snn_top_full
./obj_dir/Vtb_snn_top_full
```

Replace `tb_snn_top_full` with any other testbench name. All of them finish in seconds.

* `tb_snn_top_full` loads 10 synthetic records per class. Normal records have regular peaks
  on even bits; abnormal records have irregular spacing on odd bits plus an early beat. The
  test trains for 11 alternating rounds, so both pointers wrap. It then presents 3 unseen
  records of each class twice: once with learning off, and once with `en_stdp` left on, as in
  a live test. It checks the following:
  * neuron 37 fires for every normal test record and 38 does not, and the reverse for
    abnormal records;
  * every step's clock count;
  * that both RAMs match the STDP weights.
  
  It prints the learned weights.
* `tb_snn_top` runs the same network twice. One instance is at defaults. The other has
  `TRAIN_OFFSET = 6`, so the teacher spike precedes the next input spike and depression
  happens. It counts each mechanism and fails if one never occurs: serialised simultaneous
  spikes, training spikes, output spikes, potentiation, depression, the input-align limit,
  both pointer wraps, class switches and entering test mode.
* The unit testbenches compare against independent reference models. `tb_izh_core` uses a
  real-valued Izhikevich model and a bit-exact integer one; `tb_stdp` uses a behavioural STDP
  model; and `stdp_id_sel` is tested exhaustively.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `N_IN`, `N_NEURONS`, `N_RECORDS`, `WEIGHT_W` | 35, 39, 10, 11 | `snn_pkg` | network size, record store, weight width |
| `IN_PERIOD` | 8 | `snn_top` | steps between input presentations |
| `TRAIN_OFFSET` | 1 | `snn_top` | teacher spike delay after the inputs (steps) |
| `W_TRAIN` | 1000 | `snn_top` | fixed training-synapse weight |
| `DT_SHIFT` | 2 | `izh_core` | Euler step 2^−DT_SHIFT ms |
| `WIN_PRE`, `WIN_POST` | 4, 4 | `stdp` | STDP window in steps |
| `A_PLUS`, `A_MINUS` | 1, 2 | `stdp` | potentiation / depression amplitude |
| `TAU_PLUS_LOG2`, `TAU_MINUS_LOG2` | 1, 1 | `stdp` | halve the change every 2^n steps |

## How far to trust it

* Every module has a passing self-checking testbench. Each testbench was also confirmed to fail
  against a deliberately broken copy of its module.
* The classification demonstration uses synthetic records with a clear structural difference,
  not real MIT-BIH data. It shows that the learning loop works. It says nothing about accuracy
  on real ECGs.
* Classification depends on the own choices above (`IN_PERIOD`, `W_TRAIN`, STDP window). With
  other records the number of training presentations, and the settling time between test
  records, may need tuning. The full-size test lets the neurons settle for 400 steps between
  records, because `u` stays raised for a long time after training.
* The design has not been mapped to an FPGA. Each output neuron computes four 32 × 32-bit
  fixed-point products in one clock: v², 0.04·v², b·v and a·(b·v − u). That is a long
  combinational path. If the clock rate matters, pipeline the update or share one
  multiplier over several clocks. The UPDATE phase can simply be lengthened.
