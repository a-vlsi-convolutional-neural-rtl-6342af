// tb_pwm_neuron: self-checking test of the PWM neuron model.
//
// A 4-synapse neuron gets random pulse widths and weight voltages. V_F is
// driven so that its conductance factor follows the slot-by-slot increments
// of a sigmoid s(t) = 1/(1+exp(-(t-31.5)/6)), so a pulse of width p must
// collect w * (s(p) - s(0)): the nonlinear conversion of the document. The
// test predicts the capacitor voltage from that sum, and the output pulse
// width as the number of slots in which the ramp V_ref is below it, and
// compares both. It also sweeps identical inputs over all widths (the shape
// of the input-output curve, which must be sigmoidal) and checks that
// discharge empties the capacitor, that nothing integrates with integ low
// and that the output stays low with conv low.
module tb_pwm_neuron;
  import cnn_pkg::*;

  localparam int M = 4;
  localparam int T = 63;
  localparam real DV = 1.0e-3;
  localparam real STEP = DV * 4.0 / real'(T);   // ramp spans the full-weight maximum

  logic clk = 1'b0, discharge = 1'b0, integ = 1'b0, conv = 1'b0;
  logic [M-1:0] pwm_in = '0;
  real vw [M];
  real vf = VF_OFF, vref = 0.0;
  logic pwm_out;
  real v_cap;

  pwm_neuron #(.M(M), .DV_SLOT(DV)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real sig [T + 1];

  function automatic real g_of_t(int t);
    return sig[t + 1] - sig[t];
  endfunction

  // Runs one integrate/convert cycle; returns the output pulse width.
  task automatic cycle(input int p [M], input real wv [M], input bit do_integ,
                       input bit do_conv, output int width);
    @(negedge clk); discharge = 1'b1;
    for (int j = 0; j < M; j++) vw[j] = wv[j];
    @(negedge clk); discharge = 1'b0;
    for (int t = 0; t < T; t++) begin
      integ = do_integ;
      vf = VF_OFF - g_of_t(t) * (VF_OFF - VF_FULL);
      for (int j = 0; j < M; j++) pwm_in[j] = (t < p[j]);
      @(negedge clk);
    end
    integ = 1'b0; pwm_in = '0; vf = VF_OFF;
    width = 0;
    for (int t = 0; t < T; t++) begin
      conv = do_conv;
      vref = (real'(t) + 0.5) * STEP;
      #1;
      if (pwm_out) width++;
      @(negedge clk);
    end
    conv = 1'b0;
  endtask

  function automatic real predict(int p [M], real wv [M]);
    real v = 0.0;
    for (int j = 0; j < M; j++) begin
      real gw = (VW_ZERO - wv[j]) / (VW_ZERO - VW_MAX_WEIGHT);
      if (gw < 0.0) gw = 0.0;
      v += gw * (sig[p[j]] - sig[0]);
    end
    return v * DV;
  endfunction

  function automatic int ramp_width(real v);
    int n = 0;
    for (int t = 0; t < T; t++) if ((real'(t) + 0.5) * STEP < v) n++;
    return n;
  endfunction

  task automatic check_one(int p [M], real wv [M]);
    int width;
    real e;
    cycle(p, wv, 1'b1, 1'b1, width);
    e = predict(p, wv);
    checks++;
    if (v_cap > e + 1e-12 || v_cap < e - 1e-12) begin
      failures++;
      $display("FAIL v_cap %g expected %g", v_cap, e);
    end
    checks++;
    if (width != ramp_width(e)) begin
      failures++;
      $display("FAIL width %0d expected %0d", width, ramp_width(e));
    end
  endtask

  initial begin
    int p [M];
    real wv [M];
    int width, w_prev, d_mid, d_end;
    for (int t = 0; t <= T; t++) sig[t] = 1.0 / (1.0 + $exp(-(real'(t) - 31.5) / 6.0));

    // random inputs and weights
    for (int n = 0; n < 100; n++) begin
      for (int j = 0; j < M; j++) begin
        p[j]  = $urandom_range(0, T);
        wv[j] = 1.6 + 1.2 * real'($urandom_range(0, 32)) / 32.0;
      end
      check_one(p, wv);
    end

    // identical inputs at the largest weight: sigmoidal curve
    for (int j = 0; j < M; j++) wv[j] = 1.6;
    w_prev = 0; d_mid = 0; d_end = 0;
    for (int q = 0; q <= T; q++) begin
      for (int j = 0; j < M; j++) p[j] = q;
      check_one(p, wv);
      width = ramp_width(predict(p, wv));
      if (q >= 28 && q < 36) d_mid += width - w_prev;
      if (q >= 56) d_end += width - w_prev;
      w_prev = width;
    end
    checks++;
    if (!(d_mid > 4 * d_end)) begin
      failures++;
      $display("FAIL curve not sigmoidal: mid %0d end %0d", d_mid, d_end);
    end

    // integration disabled, conversion disabled
    for (int j = 0; j < M; j++) p[j] = T;
    cycle(p, wv, 1'b0, 1'b1, width);
    checks++;
    if (v_cap != 0.0 || width != 0) begin failures++; $display("FAIL integ low"); end
    cycle(p, wv, 1'b1, 1'b0, width);
    checks++;
    if (width != 0 || v_cap <= 0.0) begin failures++; $display("FAIL conv low"); end
    @(negedge clk); discharge = 1'b1;
    @(negedge clk); discharge = 1'b0;
    checks++;
    if (v_cap != 0.0) begin failures++; $display("FAIL discharge"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
