// stdp_id_sel: increment/decrement selection of the STDP unit ("I/D Sel.").
//
// Inputs are the spike history of the synapse being scanned and of the postsynaptic neuron.
// Bit 0 of each history is the current time step, and bit k is k steps ago. The rule is the
// design's STDP window, equation (1):
//   potentiation (incr): the postsynaptic neuron fires now and the presynaptic neuron fired
//     k = 0 .. WIN_PRE-1 steps ago (same step counts as "before");
//     change = +A_PLUS * 2^-(k / 2^TAU_PLUS_LOG2)
//   depression (decr): the presynaptic neuron fires now, the postsynaptic neuron did not,
//     and it fired k = 1 .. WIN_POST-1 steps ago;
//     change = -A_MINUS * 2^-(k / 2^TAU_MINUS_LOG2)
// The nearest spike decides k. The exponential of (1) is approximated by a right shift, one
// halving per 2^TAU_LOG2 steps; this approximation, the window lengths and the handling of
// coincident spikes are this implementation's choices. A_PLUS = 1 and A_MINUS = 2 match the
// +1 and -2 weight changes the design shows for one potentiation and one depression.
// Purely combinational; mag is the size of the change, and incr/decr are 0 when it rounds
// to zero.
module stdp_id_sel
  import snn_pkg::*;
#(
  parameter int WIN_PRE        = 4,
  parameter int WIN_POST       = 4,
  parameter int A_PLUS         = 1,
  parameter int A_MINUS        = 2,
  parameter int TAU_PLUS_LOG2  = 1,
  parameter int TAU_MINUS_LOG2 = 1
) (
  input  logic [WIN_PRE-1:0]  pre_hist,   // selected Pre_Spike history
  input  logic [WIN_POST-1:0] post_hist,  // Post_Spike history
  output logic                incr,       // Incr
  output logic                decr,       // Decr
  output weight_t             mag         // size of the change
);

  logic pre_gate, post_gate;
  int   k_pre, k_post;
  int   m_plus, m_minus;

  always_comb begin
    // nearest presynaptic spike, including the current step
    k_pre = 0;
    for (int k = WIN_PRE - 1; k >= 0; k--)
      if (pre_hist[k]) k_pre = k;
    // nearest earlier postsynaptic spike
    k_post = 1;
    for (int k = WIN_POST - 1; k >= 1; k--)
      if (post_hist[k]) k_post = k;

    pre_gate  = |pre_hist;
    post_gate = |post_hist[WIN_POST-1:1];

    m_plus  = A_PLUS  >>> (k_pre  >> TAU_PLUS_LOG2);
    m_minus = A_MINUS >>> (k_post >> TAU_MINUS_LOG2);

    incr = 1'b0;
    decr = 1'b0;
    mag  = '0;
    if (post_hist[0] && pre_gate) begin
      incr = (m_plus != 0);
      mag  = weight_t'(m_plus);
    end else if (pre_hist[0] && !post_hist[0] && post_gate) begin
      decr = (m_minus != 0);
      mag  = weight_t'(m_minus);
    end
  end

endmodule
