// tb_conv_chip_full: one complete convolution on the chip at its default
// sizes (81 neurons of 20 synapses, 100 x 100 input, 20 x 20 kernel, 6-bit
// values), 3240 operation cycles.
//
// Same method as tb_conv_chip: the testbench serves input pulses, weights,
// the V_F waveform (clipping nonlinearity f(x) = min(x, XCLIP)) and the V_ref
// ramp, reads the 81 x 81 result back and compares every pixel with an
// independent model of the schedule (count = min(63, round(S/D)) per pass,
// saturating 6-bit signed accumulation). It also checks the cycle count of
// the whole convolution and the ovf flag.
module tb_conv_chip_full;
  import cnn_pkg::*;

  localparam int N  = N_DEF;
  localparam int M  = M_DEF;
  localparam int W  = W_DEF;
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

  conv_chip dut (.*);

  always #5 clk = ~clk;

  int x [NP][NP];      // input image incl. zero border, x[row][col]
  int w [M][M];        // kernel, w[row][col]
  int y [N][N];        // model of the output, y[row][col]

  int D = 101;          // ramp step in weight units (odd)
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

    fill(3);
    s = model(0);
    run_conv(0, s);
    readout();

    $display("mechanisms:");
    need("positive-weight passes", n_pos);
    need("negative-weight passes", n_neg);
    need("first passes (load)", n_first);
    need("zero border columns", n_border);
    need("nonlinear clipping", n_clip);
    $display("  WDC full-scale counts %0d, DAS saturations %0d", n_fullcnt, n_sat);
    need("column readouts", n_read);
    checks++;
    if (n_pos != N * M || n_neg != N * M) begin
      failures++;
      $display("FAIL pass counts pos=%0d neg=%0d", n_pos, n_neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N * M * 2 * CYCLE_CLKS + 2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
