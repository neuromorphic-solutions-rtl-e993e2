// stdp_weight_cnt: synaptic weight counters of the STDP unit ("Weight cnt").
//
// Keeps one signed weight per synapse (reset to 0). In a cycle where the scan is on synapse
// syn_addr (valid), learning is enabled (EN) and I/D Sel asks for a change, the weight is
// moved by mag up (incr) or down (decr), saturating at W_MIN / W_MAX. The new value is
// written back and, one clock later, presented on WE / Addr / Weight so the neuron's synapse
// RAM receives it. WE is high for one cycle per changed weight. The saturation limits and
// the one-cycle output register are this implementation's choices.
module stdp_weight_cnt
  import snn_pkg::*;
#(
  parameter int N_SYN = N_IN,
  parameter int W_MAX = 1023,
  parameter int W_MIN = -1024
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    en,         // EN: learning enabled
  input  logic    valid,      // scan is on syn_addr
  input  naddr_t  syn_addr,   // Syn_Addr
  input  logic    incr,
  input  logic    decr,
  input  weight_t mag,
  output logic    we,         // WE
  output naddr_t  addr,       // Addr
  output weight_t weight      // Weight (Syn_Weight)
);

  weight_t w [N_SYN];
  logic signed [WEIGHT_W+1:0] w_next;
  logic upd;

  always_comb begin
    upd    = en && valid && (incr || decr) && int'(syn_addr) < N_SYN;
    w_next = '0;
    if (int'(syn_addr) < N_SYN) begin
      if (incr)      w_next = (WEIGHT_W+2)'(w[syn_addr]) + (WEIGHT_W+2)'(mag);
      else if (decr) w_next = (WEIGHT_W+2)'(w[syn_addr]) - (WEIGHT_W+2)'(mag);
      else           w_next = (WEIGHT_W+2)'(w[syn_addr]);
    end
    if (w_next > (WEIGHT_W+2)'(W_MAX)) w_next = (WEIGHT_W+2)'(W_MAX);
    if (w_next < (WEIGHT_W+2)'(W_MIN)) w_next = (WEIGHT_W+2)'(W_MIN);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N_SYN; i++) w[i] <= '0;
      we     <= 1'b0;
      addr   <= '0;
      weight <= '0;
    end else begin
      we <= upd;
      if (upd) begin
        w[syn_addr] <= weight_t'(w_next);
        addr        <= syn_addr;
        weight      <= weight_t'(w_next);
      end
    end
  end

endmodule
