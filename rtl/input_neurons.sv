// input_neurons: the 35 input neurons, one per bit of the binarised ECG record.
//
// Input neuron i fires when bit i of the presented record (digit) is 1. It fires once every
// IN_PERIOD time steps, in the steps where the shared step phase is 0. The spike vector is
// registered on the step strobe and held until the next step. The design states only that
// each input neuron corresponds to one record bit. The periodic rate coding is this
// implementation's choice: it gives the STDP window separate pre/post pairs.
module input_neurons
  import snn_pkg::*;
#(
  parameter int N     = N_IN,
  parameter int PH_W  = 3
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            step,    // produce this step's spikes
  input  logic [PH_W-1:0] phase,   // step phase, 0 .. IN_PERIOD-1
  input  logic [N-1:0]    digit,   // record bits
  output logic [N-1:0]    spikes   // Spikes_reg
);

  always_ff @(posedge clk) begin
    if (rst)       spikes <= '0;
    else if (step) spikes <= (phase == '0) ? digit : '0;
  end

endmodule
