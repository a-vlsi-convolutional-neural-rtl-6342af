// tb_conv_chip: end-to-end test of the convolution chip at reduced size
// (N = 6 neurons, M = 3 synapses, 6-bit values).
//
// The testbench plays the external controller: it serves the input PWM
// pulses of the column the chip asks for, the kernel column of the current
// pass, the V_F waveform and the V_ref ramp, and reads the results back.
// V_F is held at full conduction for the first XCLIP slots and switched off
// afterwards, which makes the synapse nonlinearity f(x) = min(x, XCLIP).
// The ramp steps by D weight units per slot (D odd: 31, then 7, so no comparison is a
// tie), so each operation cycle yields count = min(2^W-1, round(S/D)) with
// S = sum_k |w_k| * f(x_k) over the weights of the pass's sign (weights in
// units of 1/32). An independent model applies the same schedule with
// saturation to the 6-bit signed range and predicts every output pixel.
//
// Runs: (1) a convolution from zero, (2) a second one accumulated onto the
// first, (3) one with large weights that drives counts and sums into
// saturation, (4) one from zero again over the saturated contents. It
// checks each pixel, the ovf flag and the N*M*2 operation cycles of
// 2*(2^W-1)+3 clocks per convolution, and counts the mechanisms:
// positive and negative passes, loading first passes, accumulation mode,
// zero border columns, clipping by the nonlinearity, WDC full-scale counts,
// DAS saturation and readouts.
module tb_conv_chip;
  import cnn_pkg::*;

  localparam int N  = 6;
  localparam int M  = 3;
  localparam int W  = 6;
  localparam int NP = N + M - 1;
  localparam int T  = (1 << W) - 1;
  localparam int H  = (M - 1) / 2;          // border rows/columns above/left
  localparam int XCLIP = 40;
  localparam real DV_SLOT = 1.0e-3;         // pwm_neuron default
  localparam int CYCLE_CLKS = 2 * T + 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0, accum = 1'b0;
  logic busy, done, ovf, neg;
  phase_e phase;
  logic [W-1:0] slot;
  logic [$clog2(NP)-1:0] in_col;
  logic [$clog2(M)-1:0]  rf_col;
  logic [NP-1:0] in_pwm;
  logic signed [M-1:0][W-1:0] w_code;
  real vf, vref;
  logic rd_en = 1'b0;
  logic [$clog2(N)-1:0] rd_addr = '0;
  logic [N-1:0][W-1:0] rd_data;

  conv_chip #(.N(N), .M(M), .W(W)) dut (.*);

  always #5 clk = ~clk;

  int x [NP][NP];      // input image incl. zero border, x[row][col]
  int w [M][M];        // kernel, w[row][col]
  int y [N][N];        // model of the output, y[row][col]

  int D = 31;          // ramp step in weight units (odd)
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_first = 0, n_accum = 0, n_border = 0;
  int n_clip = 0, n_fullcnt = 0, n_sat = 0, n_ovf = 0, n_read = 0;
  bit accum_run = 0;

  // External controller: pulses, weights and analog waveforms.
  always_comb begin
    for (int r = 0; r < NP; r++)
      in_pwm[r] = (phase == PH_INTEG) && (int'(slot) < x[r][in_col]);
    for (int k = 0; k < M; k++)
      w_code[k] = W'(w[k][rf_col]);
    vf   = (phase == PH_INTEG && int'(slot) < XCLIP) ? VF_FULL : VF_OFF;
    vref = (real'(slot) + 0.5) * DV_SLOT * real'(D) / 32.0;
  end

  // Count passes as the chip starts them.
  always @(posedge clk) if (rst_n && phase == PH_RESET) begin
    if (neg) n_neg++; else n_pos++;
    if (!neg && rf_col == 0 && !accum_run) n_first++;
    if (int'(in_col) < H || int'(in_col) >= H + N) n_border++;
  end

  function automatic int fclip(int v);
    if (v > XCLIP) begin n_clip++; return XCLIP; end
    return v;
  endfunction

  function automatic int sat6(int v);
    if (v > 31)  begin n_sat++; return 31;  end
    if (v < -32) begin n_sat++; return -32; end
    return v;
  endfunction

  // Reference model; returns whether any partial sum saturated.
  function automatic bit model(bit acc_mode);
    bit any_sat = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int acc = acc_mode ? y[i][j] : 0;
        for (int c = 0; c < M; c++)
          for (int s = 0; s < 2; s++) begin
            int sum = 0, cnt, nsat0;
            for (int k = 0; k < M; k++) begin
              int wk = (s == 0) ? w[k][c] : -w[k][c];
              if (wk > 0) sum += wk * fclip(x[i+k][j+c]);
            end
            cnt = (2 * sum + D) / (2 * D);          // round(sum / D)
            if (cnt > T) cnt = T;
            if (cnt == T) n_fullcnt++;
            if (c == 0 && s == 0 && !acc_mode) acc = 0;
            nsat0 = n_sat;
            acc = sat6((s == 0) ? acc + cnt : acc - cnt);
            if (n_sat != nsat0) any_sat = 1;
          end
        y[i][j] = acc;
      end
    return any_sat;
  endfunction

  task automatic fill(int wmax);
    for (int r = 0; r < NP; r++)
      for (int c = 0; c < NP; c++)
        x[r][c] = (r >= H && r < H + N && c >= H && c < H + N) ? int'($urandom_range(0, T)) : 0;
    for (int k = 0; k < M; k++)
      for (int c = 0; c < M; c++)
        w[k][c] = int'($urandom_range(0, 2 * wmax)) - wmax;
  endtask

  task automatic run_conv(bit acc_mode, bit exp_ovf);
    longint t0, t1;
    accum_run = acc_mode;
    @(negedge clk); start = 1'b1; accum = acc_mode;
    @(negedge clk); start = 1'b0; accum = 1'b0;
    t0 = $time;
    while (!done) @(negedge clk);
    t1 = $time;
    checks++;
    // done comes one clock after the last write; busy rose one clock after start.
    if ((t1 - t0) / 10 != N * M * 2 * CYCLE_CLKS) begin
      failures++;
      $display("FAIL cycle count %0d, expected %0d", (t1 - t0) / 10, N * M * 2 * CYCLE_CLKS);
    end
    checks++;
    if (ovf !== exp_ovf) begin
      failures++;
      $display("FAIL ovf=%0b expected %0b", ovf, exp_ovf);
    end
    if (ovf) n_ovf++;
    if (acc_mode) n_accum++;
  endtask

  task automatic readout();
    for (int j = 0; j < N; j++) begin
      @(negedge clk); rd_en = 1'b1; rd_addr = ($clog2(N))'(j);
      @(negedge clk); rd_en = 1'b0;
      n_read++;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'($signed(rd_data[i])) != y[i][j]) begin
          failures++;
          if (failures < 10)
            $display("FAIL pixel (%0d,%0d) = %0d, expected %0d", i, j, $signed(rd_data[i]), y[i][j]);
        end
      end
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else
      $display("  %-28s %0d", what, n);
  endtask

  initial begin
    bit s;
    for (int r = 0; r < NP; r++) for (int c = 0; c < NP; c++) x[r][c] = 0;
    for (int k = 0; k < M; k++) for (int c = 0; c < M; c++) w[k][c] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    fill(5);
    s = model(0);
    run_conv(0, s);
    readout();

    fill(5);
    s = model(1);
    run_conv(1, s);
    readout();

    fill(31);
    D = 7;
    s = model(0);
    run_conv(0, s);
    readout();

    fill(5);
    D = 31;
    s = model(0);
    run_conv(0, s);
    readout();

    $display("mechanisms:");
    need("positive-weight passes", n_pos);
    need("negative-weight passes", n_neg);
    need("first passes (load)", n_first);
    need("accumulating runs", n_accum);
    need("zero border columns", n_border);
    need("nonlinear clipping", n_clip);
    need("WDC full-scale counts", n_fullcnt);
    need("DAS saturations", n_sat);
    need("ovf flag raised", n_ovf);
    need("column readouts", n_read);
    checks++;
    if (n_pos != 4 * N * M || n_neg != 4 * N * M) begin
      failures++;
      $display("FAIL pass counts pos=%0d neg=%0d", n_pos, n_neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * N * M * 2 * CYCLE_CLKS + 2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
