// izh_neuron: one Izhikevich output neuron with its own synapse memory.
//
// Structure (as in the design's neuron architecture): a synapse RAM written through
// WE/Addr/Weight and read at the address on AER_Bus; an input-align block that turns the
// weights of the events of a time step into the current I (limited below at -140); and the
// v and u equations with their stores (izh_core).
//
// Timing: while aer_valid is high the weight of synapse AER_Bus is read (asynchronously) and
// accumulated. A pulse on EN then advances v and u one step with that current, and Spike_out
// is updated one clock later and held until the next EN. The neuron does nothing between
// enables; this is how the AER bus halts it while spikes are being sent. The separate
// aer_valid qualifier, the RST port behaviour and the timing are this implementation's.
module izh_neuron
  import snn_pkg::*;
#(
  parameter int DEPTH    = N_PRE,
  parameter int DT_SHIFT = 2
) (
  input  logic     clk,        // CLK
  input  logic     rst,        // RST
  input  logic     en,         // EN: neuron update
  input  logic     we,         // WE
  input  naddr_t   addr,       // Addr: RAM write address
  input  weight_t  weight,     // Weight: RAM write data
  input  naddr_t   aer_bus,    // AER_Bus: address of the neuron that spiked
  input  logic     aer_valid,  // an address is on AER_Bus this cycle
  output logic     spike_out,  // Spike_out
  output fix_t     v_out,      // membrane potential (Q16.16 mV)
  output fix_t     u_out,      // recovery variable (Q16.16)
  output logic     clamped     // input-align limit acting
);

  weight_t  syn_w;
  current_t i_cur;

  synapse_ram #(.DEPTH(DEPTH)) u_ram (
    .clk (clk), .we (we), .a (addr), .di (weight),
    .dpra(aer_bus), .dpo(syn_w)
  );

  input_align u_align (
    .clk(clk), .rst(rst), .en(en),
    .syn_valid(aer_valid), .syn_in(syn_w),
    .i_out(i_cur), .clamped(clamped)
  );

  izh_core #(.DT_SHIFT(DT_SHIFT)) u_core (
    .clk(clk), .rst(rst), .en(en), .i_in(i_cur),
    .spike_out(spike_out), .v_out(v_out), .u_out(u_out)
  );

endmodule
