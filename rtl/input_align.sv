// input_align: forms a neuron's input current I from the synaptic events of one time step.
//
// While the AER bus delivers spikes (syn_valid high), the weight read from the synapse RAM
// for each event is added to an accumulator. The current presented to the v equation is the
// accumulated sum, limited from below at I_FLOOR (-140), so that a strongly negative sum of
// weights cannot drive the membrane into the unstable region of the model and cause a false
// spike. On EN (the neuron update) the accumulator is cleared for the next step; an event in
// the same cycle as EN starts the new sum. The lower limit of -140 is the design's; the
// accumulation over a step, the upper saturation and the widths are this implementation's.
//
// Timing: i_out is combinational from the accumulator; clamped reports that the limit acts.
module input_align
  import snn_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     en,         // EN: neuron update, consumes and clears the sum
  input  logic     syn_valid,  // an AER event for this neuron this cycle
  input  weight_t  syn_in,     // Synaptic_in: weight of the event's synapse
  output current_t i_out,      // I
  output logic     clamped     // the -140 limit is acting
);

  localparam current_t CUR_MAX = current_t'({1'b0, {(CUR_W-1){1'b1}}});
  localparam current_t CUR_FLOOR = current_t'(I_FLOOR);

  current_t acc;
  logic signed [CUR_W:0] sum;

  assign sum = (en ? '0 : {acc[CUR_W-1], acc}) + (CUR_W+1)'(syn_in);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
    end else if (syn_valid) begin
      // saturate upward; the downward direction is limited at the output
      if (sum > (CUR_W+1)'(CUR_MAX))          acc <= CUR_MAX;
      else if (sum < -(CUR_W+1)'(CUR_MAX))    acc <= -CUR_MAX;
      else                                    acc <= current_t'(sum);
    end else if (en) begin
      acc <= '0;
    end
  end

  always_comb begin
    clamped = (acc < CUR_FLOOR);
    i_out   = clamped ? CUR_FLOOR : acc;
  end

endmodule
