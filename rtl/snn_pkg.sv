// snn_pkg: sizes, number formats and types shared by the spiking ECG classifier.
//
// Network organisation (from the design): neurons 0..34 are input neurons, one per bit of a
// 35-bit binarised ECG record; neurons 35 and 36 are training neurons; neurons 37 and 38 are
// the output neurons for the "normal" and "abnormal" classes. Only the output neurons are
// Izhikevich neurons with synapses; their presynaptic neurons are 0..36.
//
// Synaptic weights are 11-bit signed integers (the Weight[10:0] bus of the design). The
// membrane potential v and recovery variable u are held in signed Q16.16 fixed point, in mV;
// this format is this implementation's choice.
package snn_pkg;

  localparam int N_IN       = 35;           // input neurons 0..34
  localparam int N_TRAIN    = 2;            // training neurons 35, 36
  localparam int N_OUT      = 2;            // output neurons 37, 38
  localparam int N_NEURONS  = N_IN + N_TRAIN + N_OUT;  // 39
  localparam int N_PRE      = N_IN + N_TRAIN;          // 37 presynaptic neurons per output
  localparam int AER_W      = $clog2(N_NEURONS);       // 6-bit neuron address
  localparam int WEIGHT_W   = 11;           // Weight[10:0]
  localparam int CUR_W      = 20;           // input current accumulator width
  localparam int N_RECORDS  = 10;           // training records per class
  localparam int REC_IDX_W  = $clog2(N_RECORDS);

  // Izhikevich state format
  localparam int V_W  = 32;
  localparam int FRAC = 16;

  typedef logic signed [WEIGHT_W-1:0] weight_t;
  typedef logic signed [CUR_W-1:0]    current_t;
  typedef logic signed [V_W-1:0]      fix_t;
  typedef logic        [AER_W-1:0]    naddr_t;
  typedef logic        [N_IN-1:0]     record_t;

  // Neuron indices of the training and output neurons
  localparam int TRAIN_NORMAL   = 35;
  localparam int TRAIN_ABNORMAL = 36;
  localparam int OUT_NORMAL     = 37;
  localparam int OUT_ABNORMAL   = 38;

  // Input-align lower limit on the current (mV)
  localparam int I_FLOOR = -140;

  // Phases of one network time step
  typedef enum logic [2:0] {
    PH_INIT,    // clear the synapse RAMs and load the fixed training synapses
    PH_IDLE,    // wait for run
    PH_SPIKE,   // input and training neurons produce this step's spikes
    PH_AER,     // spikes are sent one by one over the AER bus; neurons halted
    PH_UPDATE,  // neurons advance v and u by one step
    PH_LEARN    // STDP units scan their synapses
  } phase_t;

  // Convert an integer number of mV to Q16.16
  function automatic fix_t to_fix(input int mv);
    return fix_t'(mv) <<< FRAC;
  endfunction

endpackage
