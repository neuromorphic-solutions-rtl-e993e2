// synapse_ram: synaptic weight memory of one output neuron.
//
// One weight per presynaptic neuron, indexed by that neuron's address. It has two ports,
// following the RAM block of the neuron architecture:
//   write port (A, DI, WE): synchronous write on the rising clock edge, used by the STDP unit
//                           and by the start-up initialisation;
//   read port  (DPRA, DPO): asynchronous read at the address currently on the AER bus, so the
//                           weight of the spiking synapse is available in the same cycle.
// This is the form of a distributed (LUT) RAM. Reads at addresses at or beyond DEPTH return
// 0. The contents are not reset; the controller writes every entry after reset.
module synapse_ram
  import snn_pkg::*;
#(
  parameter int DEPTH = N_PRE
) (
  input  logic    clk,
  input  logic    we,     // WE
  input  naddr_t  a,      // A: write address
  input  weight_t di,     // DI: write data
  input  naddr_t  dpra,   // DPRA: read address (AER bus)
  output weight_t dpo     // DPO: read data
);

  weight_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(a) < DEPTH) mem[a] <= di;
  end

  always_comb begin
    if (int'(dpra) < DEPTH) dpo = mem[dpra];
    else                    dpo = '0;
  end

endmodule
