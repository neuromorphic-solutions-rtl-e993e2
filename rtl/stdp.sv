// stdp: spike-timing-dependent plasticity learning unit of one output neuron.
//
// Follows the design's STDP architecture: an address counter (stdp_addr_cnt) selects one
// synapse at a time. The Pre_Spikes history of that synapse is multiplexed out and held
// against the Post_Spike history. The increment/decrement selector (stdp_id_sel) applies the
// STDP window of equation (1), and the weight counters (stdp_weight_cnt) apply the change and
// write it to the neuron's synapse RAM through WE / Addr / Weight.
//
// Operation per network time step: a pulse on EN_Addr shifts this step's Pre_Spikes and
// Post_Spike into the history shift registers (bit 0 = newest), then scans synapses
// 0 .. N_SYN-1, one per clock. busy is high during the scan and done pulses at its end, so a
// scan takes N_SYN + 1 clocks after EN_Addr. EN low freezes the weights but the histories
// still shift. Keeping one history register per synapse, rather than sharing one behind the
// input multiplexer, is this implementation's choice.
module stdp
  import snn_pkg::*;
#(
  parameter int N_SYN          = N_IN,
  parameter int WIN_PRE        = 4,
  parameter int WIN_POST       = 4,
  parameter int A_PLUS         = 1,
  parameter int A_MINUS        = 2,
  parameter int TAU_PLUS_LOG2  = 1,
  parameter int TAU_MINUS_LOG2 = 1
) (
  input  logic             clk,         // CLK
  input  logic             rst,         // RST
  input  logic             en,          // EN: learning enabled
  input  logic             en_addr,     // EN_Addr: new time step, start scan
  input  logic [N_SYN-1:0] pre_spikes,  // Pre_Spikes
  input  logic             post_spike,  // Post_Spike
  output naddr_t           addr,        // Addr
  output logic             we,          // WE
  output weight_t          weight,      // Weight
  output logic             busy,
  output logic             done
);

  logic [WIN_PRE-1:0]  pre_hist [N_SYN];
  logic [WIN_POST-1:0] post_hist;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N_SYN; i++) pre_hist[i] <= '0;
      post_hist <= '0;
    end else if (en_addr && !busy) begin
      for (int i = 0; i < N_SYN; i++) pre_hist[i] <= {pre_hist[i][WIN_PRE-2:0], pre_spikes[i]};
      post_hist <= {post_hist[WIN_POST-2:0], post_spike};
    end
  end

  naddr_t syn_addr;
  logic   active;

  stdp_addr_cnt #(.N_SYN(N_SYN)) u_addr (
    .clk(clk), .rst(rst), .en_addr(en_addr),
    .syn_addr(syn_addr), .active(active), .done(done)
  );

  // input multiplexer: history of the addressed synapse
  logic [WIN_PRE-1:0] sel_hist;
  always_comb begin
    sel_hist = '0;
    if (int'(syn_addr) < N_SYN) sel_hist = pre_hist[syn_addr];
  end

  logic    incr, decr;
  weight_t mag;

  stdp_id_sel #(
    .WIN_PRE(WIN_PRE), .WIN_POST(WIN_POST), .A_PLUS(A_PLUS), .A_MINUS(A_MINUS),
    .TAU_PLUS_LOG2(TAU_PLUS_LOG2), .TAU_MINUS_LOG2(TAU_MINUS_LOG2)
  ) u_sel (
    .pre_hist(sel_hist), .post_hist(post_hist),
    .incr(incr), .decr(decr), .mag(mag)
  );

  stdp_weight_cnt #(.N_SYN(N_SYN)) u_wcnt (
    .clk(clk), .rst(rst), .en(en), .valid(active), .syn_addr(syn_addr),
    .incr(incr), .decr(decr), .mag(mag),
    .we(we), .addr(addr), .weight(weight)
  );

  assign busy = active;

endmodule
