// training_neurons: the two training (teacher) neurons, 35 for "normal", 36 for "abnormal".
//
// During training, image_signal says which class is being shown (1 = normal, 2 = abnormal,
// as the data sequencer encodes it). The training neuron of that class fires in the steps
// whose phase equals TRAIN_OFFSET, that is TRAIN_OFFSET steps after the input neurons. Its
// strong fixed synapse makes the class's output neuron fire just after the record's input
// spikes, and STDP then potentiates those synapses. Training neurons are silent when train
// is low. Which classes the two neurons serve is the design's. The firing phase and the
// fixed synapse are this implementation's way of making the teacher neuron lead the output.
module training_neurons
  import snn_pkg::*;
#(
  parameter int PH_W         = 3,
  parameter int TRAIN_OFFSET = 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            step,
  input  logic [PH_W-1:0] phase,
  input  logic            train,          // training mode
  input  logic [1:0]      image_signal,   // Image_Signal: 1 normal, 2 abnormal
  output logic [1:0]      spikes          // [0] neuron 35, [1] neuron 36
);

  logic fire_now;
  assign fire_now = train && (int'(phase) == TRAIN_OFFSET);

  always_ff @(posedge clk) begin
    if (rst) begin
      spikes <= '0;
    end else if (step) begin
      spikes[0] <= fire_now && (image_signal == 2'd1);
      spikes[1] <= fire_now && (image_signal == 2'd2);
    end
  end

endmodule
