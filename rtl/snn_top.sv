// snn_top: spiking neural network that classifies binarised ECG records as normal or
// abnormal, with on-chip STDP learning.
//
// Network: 35 input neurons (0..34), one per bit of a 35-bit ECG record; training neurons
// 35 (normal) and 36 (abnormal); Izhikevich output neurons 37 (normal) and 38 (abnormal).
// Each output neuron has its own synapse RAM for presynaptic neurons 0..36 and its own STDP
// unit, which learns the weights of synapses 0..34. Training neuron 35 is wired to neuron
// 37 and 36 to 38 through a fixed strong synapse.
//
// Per time step (see snn_ctrl): the input and training neurons fire. The AER bus sends their
// addresses to both output neurons one at a time, with the neurons halted meanwhile. The
// neurons update. Each STDP unit scans its synapses and writes changed weights into its
// neuron's RAM.
//
// Modes (image_signal, as in the design's data insertion):
//   1 / 2  training: Digit is the stored normal / abnormal record chosen by the data
//          sequencer, and the matching training neuron fires TRAIN_OFFSET steps after the
//          inputs, so the class's output neuron fires and STDP potentiates the active inputs;
//   0      testing: the input neurons take digit_noise and no training neuron fires; the
//          class is read from which of spike_out[0] (neuron 37) and spike_out[1]
//          (neuron 38) fires.
// en_stdp enables weight changes in either mode.
//
// After reset the controller spends N_PRE clocks loading the synapse RAMs (ready low).
// Records are loaded through rec_*. spikes holds the 39-neuron spike vector of the last
// step; step_done pulses at the end of every step. The network organisation, neuron model,
// STDP architecture, AER bus and data insertion follow the design. The step sequencing,
// the rate coding of the inputs and the training-synapse weight are this implementation's.
module snn_top
  import snn_pkg::*;
#(
  parameter int IN_PERIOD    = 8,
  parameter int TRAIN_OFFSET = 1,
  parameter int W_TRAIN      = 1000
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 run,           // keep stepping the network
  input  logic [1:0]           image_signal,  // Image_Signal: 0 test, 1 normal, 2 abnormal
  input  logic                 en_stdp,       // EN_STDP: learning enable
  input  record_t              digit_noise,   // Digit_Noise: test record
  input  logic                 rec_we,        // training record load port
  input  logic                 rec_class,
  input  logic [REC_IDX_W-1:0] rec_idx,
  input  record_t              rec_data,
  output logic                 ready,
  output logic [N_OUT-1:0]     spike_out,     // [0] neuron 37, [1] neuron 38
  output logic [N_NEURONS-1:0] spikes,        // all neurons' spikes of the last step
  output logic                 step_done,
  output logic [31:0]          step_count,
  output record_t              digit,         // Digit from the data sequencer
  output logic [REC_IDX_W-1:0] n_counter,     // normal record pointer
  output logic [REC_IDX_W-1:0] a_counter,     // abnormal record pointer
  output logic                 aer_halt,      // neurons halted by the AER bus
  output logic                 aer_multi,     // last step had simultaneous spikes
  output logic [N_OUT-1:0]     clamped,       // input-align limit acting, per neuron
  output logic [N_OUT-1:0]     syn_we         // STDP weight write, per neuron
);

  localparam int PH_W = (IN_PERIOD > 1) ? $clog2(IN_PERIOD) : 1;

  // ---------------- control ----------------
  phase_t          state;
  logic            step, aer_load, neuron_en, stdp_en_addr, init_we;
  naddr_t          init_addr;
  weight_t         init_w [N_OUT];
  logic [PH_W-1:0] phase_cnt;
  logic            aer_done;
  logic [N_OUT-1:0] stdp_done, stdp_busy;

  snn_ctrl #(
    .INIT_DEPTH(N_PRE), .IN_PERIOD(IN_PERIOD), .PH_W(PH_W), .W_TRAIN(W_TRAIN)
  ) u_ctrl (
    .clk(clk), .rst(rst), .run(run),
    .aer_done(aer_done), .stdp_done(stdp_done[0]),
    .state(state), .ready(ready), .step(step), .aer_load(aer_load),
    .neuron_en(neuron_en), .stdp_en_addr(stdp_en_addr),
    .init_we(init_we), .init_addr(init_addr), .init_w(init_w),
    .phase_cnt(phase_cnt), .step_count(step_count), .step_done(step_done)
  );

  // ---------------- data insertion ----------------
  data_sequencer u_seq (
    .clk(clk), .rst(rst), .image_signal(image_signal),
    .rec_we(rec_we), .rec_class(rec_class), .rec_idx(rec_idx), .rec_data(rec_data),
    .digit(digit), .n_counter(n_counter), .a_counter(a_counter)
  );

  record_t in_record;
  assign in_record = (image_signal == 2'd0) ? digit_noise : digit;

  // ---------------- spike sources ----------------
  logic [N_IN-1:0]    in_spikes;
  logic [N_TRAIN-1:0] tr_spikes;

  input_neurons #(.N(N_IN), .PH_W(PH_W)) u_in (
    .clk(clk), .rst(rst), .step(step), .phase(phase_cnt),
    .digit(in_record), .spikes(in_spikes)
  );

  training_neurons #(.PH_W(PH_W), .TRAIN_OFFSET(TRAIN_OFFSET)) u_train (
    .clk(clk), .rst(rst), .step(step), .phase(phase_cnt),
    .train(image_signal != 2'd0), .image_signal(image_signal), .spikes(tr_spikes)
  );

  // ---------------- AER bus ----------------
  naddr_t aer_addr;
  logic   aer_valid;

  aer_bus #(.N_SRC(N_PRE)) u_aer (
    .clk(clk), .rst(rst), .load(aer_load), .spikes({tr_spikes, in_spikes}),
    .aer_addr(aer_addr), .aer_valid(aer_valid), .halt(aer_halt),
    .multi(aer_multi), .done(aer_done)
  );

  // ---------------- output neurons with their STDP units ----------------
  for (genvar n = 0; n < N_OUT; n++) begin : g_out
    naddr_t  stdp_addr, ram_addr;
    logic    stdp_we, ram_we;
    weight_t stdp_w, ram_w;
    fix_t    v_n, u_n;

    stdp #(.N_SYN(N_IN)) u_stdp (
      .clk(clk), .rst(rst), .en(en_stdp), .en_addr(stdp_en_addr),
      .pre_spikes(in_spikes), .post_spike(spike_out[n]),
      .addr(stdp_addr), .we(stdp_we), .weight(stdp_w),
      .busy(stdp_busy[n]), .done(stdp_done[n])
    );

    // the start-up load shares the RAM write port with the STDP unit
    always_comb begin
      ram_we   = init_we ? 1'b1        : stdp_we;
      ram_addr = init_we ? init_addr   : stdp_addr;
      ram_w    = init_we ? init_w[n]   : stdp_w;
    end

    izh_neuron #(.DEPTH(N_PRE)) u_neuron (
      .clk(clk), .rst(rst), .en(neuron_en),
      .we(ram_we), .addr(ram_addr), .weight(ram_w),
      .aer_bus(aer_addr), .aer_valid(aer_valid),
      .spike_out(spike_out[n]), .v_out(v_n), .u_out(u_n), .clamped(clamped[n])
    );

    assign syn_we[n] = stdp_we;
  end

  assign spikes = {spike_out, tr_spikes, in_spikes};

endmodule
