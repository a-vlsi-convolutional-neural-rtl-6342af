// pwm_neuron: behavioural model of one PWM neuron circuit (analog; not
// synthesizable logic).
//
// The neuron sums weighted, nonlinearly converted inputs as charge on its
// integrating capacitor C_i and outputs the capacitor voltage as a pulse
// width. Each of its M synapses has two series transistors: M1, whose gate
// voltage V_w sets the weight, and M2, whose gate is driven by the shared
// waveform V_F. While input pulse j is high, synapse j drives current into
// C_i in proportion to g_w(V_w) * g_f(V_F). Because V_F(t) is shaped like the
// derivative of the nonlinear function f, the charge collected over a pulse
// of width p is w * f(p): weighting and nonlinear conversion happen in one
// switching operation. The output pulse is high while the linear ramp V_ref
// is below the capacitor voltage.
//
// Discrete-time model, one clock per PWM slot:
//   g_w(V_w) = clamp((VW_ZERO - V_w) / (VW_ZERO - VW_MAX_WEIGHT), 0, 1)
//   g_f(V_F) = clamp((VF_OFF  - V_F) / (VF_OFF  - VF_FULL),       0, 1)
//   per slot with integ high: v_cap += DV_SLOT * sum_j pwm_in[j]*g_w(vw[j])*g_f(vf)
//   pwm_out = conv && (vref < v_cap)
// The linear transistor laws and DV_SLOT (capacitor step per slot at full
// weight and full V_F) are this model's assumptions; the document gives the
// structure and the measured weight range, not device equations. The
// capacitor is not clamped at the supply.
//
// Interface: discharge (synchronous) empties C_i; integ enables integration
// at each rising clk edge; conv enables the comparator output.
module pwm_neuron
  import cnn_pkg::*;
#(
  parameter int unsigned M       = 20,
  parameter real         DV_SLOT = 1.0e-3
) (
  input  logic         clk,
  input  logic         discharge,
  input  logic         integ,
  input  logic         conv,
  input  logic [M-1:0] pwm_in,
  input  real          vw [M],
  input  real          vf,
  input  real          vref,
  output logic         pwm_out,
  output real          v_cap
);

  real dq;

  function automatic real clamp01(input real x);
    if (x < 0.0) return 0.0;
    if (x > 1.0) return 1.0;
    return x;
  endfunction

  always_comb begin
    real gf;
    gf = clamp01((VF_OFF - vf) / (VF_OFF - VF_FULL));
    dq = 0.0;
    for (int j = 0; j < int'(M); j++)
      if (pwm_in[j])
        dq += clamp01((VW_ZERO - vw[j]) / (VW_ZERO - VW_MAX_WEIGHT)) * gf;
    dq *= DV_SLOT;
  end

  always_ff @(posedge clk) begin
    if (discharge)
      v_cap <= 0.0;
    else if (integ)
      v_cap <= v_cap + dq;
  end

  assign pwm_out = conv && (vref < v_cap);

endmodule
