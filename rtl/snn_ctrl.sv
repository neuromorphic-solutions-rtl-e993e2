// snn_ctrl: time-step sequencer of the network.
//
// After reset it walks the synapse RAM addresses 0 .. INIT_DEPTH-1 once (init_we). It writes
// W_TRAIN into the output neuron's synapse from its own training neuron (35 for neuron 37,
// 36 for neuron 38) and 0 everywhere else. ready then goes high. While run is high it
// repeats network time steps, each in these phases:
//   PH_SPIKE  one clock: step pulses and the input and training neurons register spikes;
//   PH_AER    aer_load pulses in the first clock, then wait for aer_done; the neurons are
//             halted (no EN) while the AER bus serialises the spikes;
//   PH_UPDATE one clock: neuron_en, every output neuron advances v and u;
//   PH_LEARN  stdp_en_addr pulses in the first clock, then wait for stdp_done.
// step_done is high in the last clock of PH_LEARN, so inputs changed right after it are
// seen by the next step's spikes. At the end of that clock phase_cnt advances modulo
// IN_PERIOD and step_count increments. A step with K presynaptic spikes and N_SYN STDP synapses takes
// 1 + (K + 2) + 1 + (N_SYN + 2) clocks. The design says only that EN activates the neurons
// and that the AER bus halts them; this phase sequence and the start-up load of the
// training synapses are this implementation's.
module snn_ctrl
  import snn_pkg::*;
#(
  parameter int INIT_DEPTH = N_PRE,
  parameter int IN_PERIOD  = 8,
  parameter int PH_W       = 3,
  parameter int W_TRAIN    = 1000
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            run,
  input  logic            aer_done,
  input  logic            stdp_done,
  output phase_t          state,
  output logic            ready,
  output logic            step,
  output logic            aer_load,
  output logic            neuron_en,
  output logic            stdp_en_addr,
  output logic            init_we,
  output naddr_t          init_addr,
  output weight_t         init_w [N_OUT],  // [0] for neuron 37, [1] for neuron 38
  output logic [PH_W-1:0] phase_cnt,
  output logic [31:0]     step_count,
  output logic            step_done
);

  logic first;   // first clock of the current phase

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= PH_INIT;
      init_addr  <= '0;
      first      <= 1'b1;
      phase_cnt  <= '0;
      step_count <= '0;
    end else begin
      first     <= 1'b0;
      unique case (state)
        PH_INIT: begin
          if (int'(init_addr) == INIT_DEPTH - 1) state <= PH_IDLE;
          else                                   init_addr <= init_addr + 1'b1;
        end
        PH_IDLE:   if (run) state <= PH_SPIKE;
        PH_SPIKE: begin
          state <= PH_AER;
          first <= 1'b1;
        end
        PH_AER:    if (aer_done) state <= PH_UPDATE;
        PH_UPDATE: begin
          state <= PH_LEARN;
          first <= 1'b1;
        end
        PH_LEARN: begin
          if (stdp_done) begin
            step_count <= step_count + 1;
            phase_cnt  <= (int'(phase_cnt) == IN_PERIOD - 1) ? '0 : phase_cnt + 1'b1;
            state      <= run ? PH_SPIKE : PH_IDLE;
          end
        end
        default: state <= PH_IDLE;
      endcase
    end
  end

  always_comb begin
    ready        = (state != PH_INIT);
    step         = (state == PH_SPIKE);
    aer_load     = (state == PH_AER) && first;
    neuron_en    = (state == PH_UPDATE);
    stdp_en_addr = (state == PH_LEARN) && first;
    init_we      = (state == PH_INIT);
    step_done    = (state == PH_LEARN) && stdp_done;
    init_w[0]    = (int'(init_addr) == TRAIN_NORMAL)   ? weight_t'(W_TRAIN) : '0;
    init_w[1]    = (int'(init_addr) == TRAIN_ABNORMAL) ? weight_t'(W_TRAIN) : '0;
  end

endmodule
