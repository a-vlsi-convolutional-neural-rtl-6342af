// tb_feature_layers: a small hierarchical network run on the chip through
// external feedback (N = 12, M = 3, so 14 x 14 inputs).
//
// The testbench acts as the external controller that builds a multi-layer
// network out of repeated convolutions:
//   FD1  a bright rectangle on a dark background is convolved with a
//        vertical-edge kernel (class V) and a horizontal-edge kernel
//        (class H). Class V must respond only at the rectangle's left and
//        right edges, positive on one side and negative on the other: the
//        edge-extraction experiment of the chip.
//   FP1  each FD1 class is read back, rectified and doubled into the next
//        input (value = 2*max(y, 0), border zero), and pooled with a
//        positive, centre-weighted kernel. Pooled outputs must not be
//        negative.
//   FD2  one feature class fed by both FP1 classes: the first convolution
//        starts from zero, the second is accumulated onto it (accum = 1).
// Every output pixel of every stage is compared with an independent model
// of the chip's arithmetic (count = min(63, round(S/D)) per pass, S in
// weight units of 1/32, saturating 6-bit signed sums). The rectify-and-
// double mapping is this testbench's choice of what the external
// controller does between layers.
module tb_feature_layers;
  import cnn_pkg::*;

  localparam int N  = 12;
  localparam int M  = 3;
  localparam int W  = 6;
  localparam int NP = N + M - 1;
  localparam int T  = (1 << W) - 1;
  localparam int H  = (M - 1) / 2;
  localparam int D  = 15;
  localparam real DV_SLOT = 1.0e-3;
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

  typedef int img_t [NP][NP];
  typedef int ker_t [M][M];
  typedef int out_t [N][N];

  img_t x;             // current input, x[row][col]
  ker_t w;             // current kernel
  out_t y;             // model of the chip's SRAM contents
  out_t fd1_v, fd1_h, fp1_v, fp1_h, fd2;

  int checks = 0, failures = 0;

  always_comb begin
    for (int r = 0; r < NP; r++)
      in_pwm[r] = (phase == PH_INTEG) && (int'(slot) < x[r][in_col]);
    for (int k = 0; k < M; k++)
      w_code[k] = W'(w[k][rf_col]);
    vf   = VF_FULL;
    vref = (real'(slot) + 0.5) * DV_SLOT * real'(D) / 32.0;
  end

  function automatic int sat6(int v);
    if (v > 31)  return 31;
    if (v < -32) return -32;
    return v;
  endfunction

  function automatic void model(bit acc_mode);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int acc;
        acc = acc_mode ? y[i][j] : 0;
        for (int c = 0; c < M; c++)
          for (int s = 0; s < 2; s++) begin
            int sum, cnt;
            sum = 0;
            for (int k = 0; k < M; k++) begin
              int wk;
              wk = (s == 0) ? w[k][c] : -w[k][c];
              if (wk > 0) sum += wk * x[i+k][j+c];
            end
            cnt = (2 * sum + D) / (2 * D);
            if (cnt > T) cnt = T;
            acc = sat6((s == 0) ? acc + cnt : acc - cnt);
          end
        y[i][j] = acc;
      end
  endfunction

  // Runs one convolution on the chip, checks it and returns the result.
  task automatic conv(input bit acc_mode, output out_t res, input string tag);
    int bad;
    model(acc_mode);
    @(negedge clk); start = 1'b1; accum = acc_mode;
    @(negedge clk); start = 1'b0; accum = 1'b0;
    while (!done) @(negedge clk);
    bad = 0;
    for (int j = 0; j < N; j++) begin
      @(negedge clk); rd_en = 1'b1; rd_addr = ($clog2(N))'(j);
      @(negedge clk); rd_en = 1'b0;
      for (int i = 0; i < N; i++) begin
        res[i][j] = int'($signed(rd_data[i]));
        checks++;
        if (res[i][j] != y[i][j]) begin
          failures++; bad++;
          if (bad < 4) $display("FAIL %s pixel (%0d,%0d) = %0d, expected %0d", tag, i, j, res[i][j], y[i][j]);
        end
      end
    end
    $display("  %-10s checked, %0d mismatches", tag, bad);
  endtask

  // Next-layer input from a result: rectify, double, zero border.
  task automatic feed(input out_t src);
    for (int r = 0; r < NP; r++)
      for (int c = 0; c < NP; c++) x[r][c] = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) x[i + H][j + H] = (src[i][j] > 0) ? 2 * src[i][j] : 0;
  endtask

  task automatic set_kernel(input int k00, k01, k02, k10, k11, k12, k20, k21, k22);
    w[0][0] = k00; w[0][1] = k01; w[0][2] = k02;
    w[1][0] = k10; w[1][1] = k11; w[1][2] = k12;
    w[2][0] = k20; w[2][1] = k21; w[2][2] = k22;
  endtask

  task automatic need(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int pos_edges, neg_edges, misplaced;
    for (int r = 0; r < NP; r++) for (int c = 0; c < NP; c++) x[r][c] = 0;
    for (int k = 0; k < M; k++) for (int c = 0; c < M; c++) w[k][c] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Image: bright rectangle, rows 3..8, columns 4..7 of the 12 x 12 class.
    for (int i = 3; i <= 8; i++)
      for (int j = 4; j <= 7; j++) x[i + H][j + H] = 24;

    // FD1: vertical and horizontal edge detectors (Sobel-like, scaled).
    set_kernel(-4, 0, 4,  -8, 0, 8,  -4, 0, 4);
    conv(1'b0, fd1_v, "FD1 vert");
    // Edge structure: output (i, j) sees input columns j .. j+2, so it can
    // only be non-zero where those columns differ.
    pos_edges = 0; neg_edges = 0; misplaced = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        bit differs;
        differs = 0;
        for (int k = 0; k < M; k++) if (x[i + k][j] != x[i + k][j + 2]) differs = 1;
        if (fd1_v[i][j] != 0 && !differs) misplaced++;
        if (fd1_v[i][j] > 0) pos_edges++;
        if (fd1_v[i][j] < 0) neg_edges++;
      end
    need(misplaced == 0, "vertical-edge response away from an edge");
    need(pos_edges > 0 && neg_edges > 0, "both edge polarities detected");
    $display("  FD1 vert: %0d positive, %0d negative edge pixels", pos_edges, neg_edges);

    set_kernel(-4, -8, -4,  0, 0, 0,  4, 8, 4);
    conv(1'b0, fd1_h, "FD1 horiz");

    // FP1: pooling with a positive, centre-weighted kernel.
    set_kernel(2, 4, 2,  4, 8, 4,  2, 4, 2);
    feed(fd1_v);
    conv(1'b0, fp1_v, "FP1 vert");
    feed(fd1_h);
    conv(1'b0, fp1_h, "FP1 horiz");
    misplaced = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) if (fp1_v[i][j] < 0 || fp1_h[i][j] < 0) misplaced++;
    need(misplaced == 0, "pooled output negative");
    pos_edges = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) if (fp1_v[i][j] > 0 && fp1_h[i][j] > 0) pos_edges++;
    need(pos_edges > 0, "pooled classes never overlap");

    // FD2: one class over both FP1 classes (corner-like feature).
    set_kernel(0, 3, 0,  0, 3, 0,  0, -3, 0);
    feed(fp1_v);
    conv(1'b0, fd2, "FD2 part 1");
    set_kernel(0, 0, 0,  3, 3, -3,  0, 0, 0);
    feed(fp1_h);
    conv(1'b1, fd2, "FD2 part 2");
    pos_edges = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) if (fd2[i][j] > 0) pos_edges++;
    need(pos_edges > 0, "FD2 never responds");
    $display("  FD2: %0d responding pixels", pos_edges);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7 * (N * M * 2 * CYCLE_CLKS + 4 * N) + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
