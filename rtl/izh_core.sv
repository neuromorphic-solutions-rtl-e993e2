// izh_core: the "v" and "u" equations of an Izhikevich neuron with their state registers.
//
// Model (Izhikevich, as used by the design, regular-spiking regime):
//   v' = 0.04 v^2 + 5 v + 140 - u + I
//   u' = a (b v - u)
//   if v >= 30 mV: v <- c, u <- u + d
// with RS parameters a = 0.02, b = 0.2, c = -65 mV, d = 8.
// The default step of 0.25 ms is short enough that a current held at the input-align limit
// of -140 does not make the forward-Euler update overshoot into a false spike.
//
// Each pulse of en advances the state by one forward-Euler step of 2^-DT_SHIFT ms, using the
// input current i_in (mV/ms, integer). When the new v reaches V_PEAK the neuron fires:
// spike_out goes high and v and u are reset. spike_out is registered and holds this step's
// result until the next en. Between enables the state is frozen (the neuron is halted).
//
// Number format: v and u are signed Q16.16 (this implementation's choice); a and b are given
// as Q16 integers and 0.04 is rounded to 2621/65536. The step size and the lower limit V_MIN
// on v (which keeps v^2 in range) are also this implementation's choices. The reset state is
// v = c, u = b*c.
module izh_core
  import snn_pkg::*;
#(
  parameter int A_Q      = 1311,    // a = 0.02 in Q16
  parameter int B_Q      = 13107,   // b = 0.2  in Q16
  parameter int C_MV     = -65,     // c (mV)
  parameter int D_MV     = 8,       // d
  parameter int V_PEAK   = 30,      // spike detection level (mV)
  parameter int V_MIN    = -140,    // lower limit on v (mV)
  parameter int DT_SHIFT = 2        // Euler step = 2^-DT_SHIFT ms
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     en,         // EN: advance one step
  input  current_t i_in,       // I from input_align
  output logic     spike_out,  // Spike_out
  output fix_t     v_out,      // membrane potential (Q16.16 mV)
  output fix_t     u_out       // recovery variable (Q16.16)
);

  localparam int K004 = 2621;     // 0.04 in Q16

  typedef logic signed [63:0] wide_t;

  fix_t v_q, u_q;                 // "v" store, "u" store
  fix_t v_new, u_new, u_spk;
  logic fire;

  function automatic fix_t q_mul(input fix_t x, input fix_t y);
    wide_t p;
    p = wide_t'(x) * wide_t'(y);
    return fix_t'(p >>> FRAC);
  endfunction

  // "v" and "u" equations
  always_comb begin
    fix_t v2, dv, du, bv;
    v2    = q_mul(v_q, v_q);
    dv    = q_mul(v2, fix_t'(K004)) + (v_q <<< 2) + v_q + to_fix(140) - u_q
          + (fix_t'(i_in) <<< FRAC);
    bv    = q_mul(fix_t'(B_Q), v_q);
    du    = q_mul(fix_t'(A_Q), bv - u_q);
    v_new = v_q + (dv >>> DT_SHIFT);
    u_new = u_q + (du >>> DT_SHIFT);
    fire  = (v_new >= to_fix(V_PEAK));
    u_spk = u_new + to_fix(D_MV);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v_q       <= to_fix(C_MV);
      u_q       <= q_mul(fix_t'(B_Q), to_fix(C_MV));
      spike_out <= 1'b0;
    end else if (en) begin
      spike_out <= fire;
      if (fire) begin
        v_q <= to_fix(C_MV);
        u_q <= u_spk;
      end else begin
        v_q <= (v_new < to_fix(V_MIN)) ? to_fix(V_MIN) : v_new;
        u_q <= u_new;
      end
    end
  end

  assign v_out = v_q;
  assign u_out = u_q;

endmodule
