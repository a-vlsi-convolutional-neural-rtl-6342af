// tb_neuron_curve: input-output curve of a 20-synapse PWM neuron.
//
// Reproduces the chip's characterisation experiment: all 20 input pulses of
// one neuron carry the same width p (0 .. 63 slots), and the weight voltage
// V_w is stepped from 1.6 V (largest weight) to 2.7 V (smallest) in 0.1 V
// steps. V_F follows the slot-by-slot increments of a sigmoid, so each curve
// must be sigmoidal in p. The test checks every output pulse width against
// the prediction from the model's conductance laws, that each curve rises
// monotonically with p and is steepest in the middle, and that at every p a
// lower V_w (a larger weight) never gives a shorter output pulse.
module tb_neuron_curve;
  import cnn_pkg::*;

  localparam int M = 20;
  localparam int T = 63;
  localparam real DV = 1.0e-3;
  localparam real STEP = DV * real'(M) / real'(T);   // ramp spans full scale
  localparam int NV = 12;                            // 1.6 V .. 2.7 V

  logic clk = 1'b0, discharge = 1'b0, integ = 1'b0, conv = 1'b0;
  logic [M-1:0] pwm_in = '0;
  real vw [M];
  real vf = VF_OFF, vref = 0.0;
  logic pwm_out;
  real v_cap;

  pwm_neuron dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real sig [T + 1];
  int curve [NV][T + 1];

  task automatic run(int p, real v, output int width);
    @(negedge clk); discharge = 1'b1;
    for (int j = 0; j < M; j++) vw[j] = v;
    @(negedge clk); discharge = 1'b0;
    for (int t = 0; t < T; t++) begin
      integ = 1'b1;
      vf = VF_OFF - (sig[t + 1] - sig[t]) * (VF_OFF - VF_FULL);
      pwm_in = (t < p) ? '1 : '0;
      @(negedge clk);
    end
    integ = 1'b0; pwm_in = '0; vf = VF_OFF;
    width = 0;
    for (int t = 0; t < T; t++) begin
      conv = 1'b1;
      vref = (real'(t) + 0.5) * STEP;
      #1;
      if (pwm_out) width++;
      @(negedge clk);
    end
    conv = 1'b0;
  endtask

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  initial begin
    for (int t = 0; t <= T; t++) sig[t] = 1.0 / (1.0 + $exp(-(real'(t) - 31.5) / 6.0));
    for (int iv = 0; iv < NV; iv++) begin
      real v, gw;
      v  = 1.6 + 0.1 * real'(iv);
      gw = (VW_ZERO - v) / (VW_ZERO - VW_MAX_WEIGHT);
      for (int p = 0; p <= T; p++) begin
        int width, e;
        real vc;
        e  = 0;
        vc = DV * real'(M) * gw * (sig[p] - sig[0]);
        run(p, v, width);
        for (int t = 0; t < T; t++) if ((real'(t) + 0.5) * STEP < vc) e++;
        curve[iv][p] = width;
        checks++;
        if (width != e) fail($sformatf("V_w=%.1f p=%0d width %0d expected %0d", v, p, width, e));
      end
    end
    for (int iv = 0; iv < NV; iv++) begin
      int mid, tail;
      mid  = curve[iv][36] - curve[iv][28];
      tail = curve[iv][T] - curve[iv][T - 8];
      for (int p = 1; p <= T; p++) begin
        checks++;
        if (curve[iv][p] < curve[iv][p - 1]) fail($sformatf("curve %0d falls at p=%0d", iv, p));
      end
      checks++;
      if (mid <= tail) fail($sformatf("curve %0d not sigmoidal (mid %0d, tail %0d)", iv, mid, tail));
      if (iv > 0)
        for (int p = 0; p <= T; p++) begin
          checks++;
          if (curve[iv][p] > curve[iv - 1][p]) fail($sformatf("weight order at V_w step %0d p=%0d", iv, p));
        end
    end
    checks++;
    if (curve[0][T] < 50) fail("largest weight does not reach near full scale");
    $display("largest-weight curve end %0d, smallest-weight curve end %0d", curve[0][T], curve[NV - 1][T]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NV * (T + 1) * (2 * T + 3) + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
