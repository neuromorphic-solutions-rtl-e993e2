// aer_bus: address-event representation bus for the presynaptic spikes of a time step.
//
// The bus carries one spike per clock, as the address of the neuron that fired. A pulse on
// load captures this step's spike vector. From the next clock on, the lowest-numbered
// pending spike is presented on aer_addr with aer_valid high and is removed at the clock
// edge. done pulses once every spike has been sent: K spikes take K + 1 clocks from load
// to done (2 clocks when there are none).
// While any spike is pending, halt is high and the neurons must not update. This is how the
// design halts neuron operation when more than one neuron fired at once. multi reports that
// the last vector held more than one spike and so needed serialising. Lowest-index-first
// order and the load/done handshake are this implementation's choices.
module aer_bus
  import snn_pkg::*;
#(
  parameter int N_SRC = N_PRE
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,       // capture spikes
  input  logic [N_SRC-1:0] spikes,     // neurons that fired this step
  output naddr_t           aer_addr,   // AER_Bus
  output logic             aer_valid,
  output logic             halt,       // neurons halted
  output logic             multi,      // more than one spike in the last vector
  output logic             done        // all spikes sent (one-cycle pulse)
);

  logic [N_SRC-1:0] pending;
  logic             sending;

  always_comb begin
    aer_addr = '0;
    for (int i = N_SRC - 1; i >= 0; i--)
      if (pending[i]) aer_addr = naddr_t'(i);
    aer_valid = |pending;
    halt      = aer_valid;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pending <= '0;
      sending <= 1'b0;
      multi   <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load && !sending) begin
        pending <= spikes;
        sending <= 1'b1;
        multi   <= ($countones(spikes) > 1);
      end else if (sending) begin
        if (aer_valid) pending[aer_addr] <= 1'b0;
        if (!aer_valid || pending == (N_SRC'(1) << aer_addr)) begin
          sending <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

endmodule
