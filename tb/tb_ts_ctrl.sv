// tb_ts_ctrl: self-checking test of the time-sharing sequencer.
//
// At reduced size (N = 4, M = 3, W = 3, so 7 slots per PWM window and 17
// clocks per operation cycle) it compares the sequencer's outputs on every
// clock with an independent count: operation cycle k covers output column
// k/(2M), receptive-field column (k/2) mod M and sign k mod 2, and inside it
// the phases RESET, INTEG x T, CONV x T, READ, WRITE. It checks in_col, the
// first flag (only without accum), busy, the done pulse after N*M*2 cycles,
// and that a start while busy is ignored.
module tb_ts_ctrl;
  import cnn_pkg::*;

  localparam int N = 4, M = 3, W = 3;
  localparam int NP = N + M - 1;
  localparam int T = (1 << W) - 1;
  localparam int CYC = 2 * T + 3;
  localparam int OPS = N * M * 2;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, accum = 1'b0;
  logic busy, done, neg, first;
  phase_e phase;
  logic [W-1:0] slot;
  logic [$clog2(N)-1:0] out_col;
  logic [$clog2(M)-1:0] rf_col;
  logic [$clog2(NP)-1:0] in_col;

  ts_ctrl #(.N(N), .M(M), .W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic expect_eq(string what, int got, int exp_v, int k);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL clock %0d: %s = %0d, expected %0d", k, what, got, exp_v);
    end
  endtask

  task automatic run(bit acc_mode);
    @(negedge clk); start = 1'b1; accum = acc_mode;
    @(negedge clk); start = 1'b0; accum = 1'b0;
    for (int k = 0; k < OPS * CYC; k++) begin
      int op = k / CYC, r = k % CYC;
      int j = op / (2 * M), c = (op / 2) % M, s = op % 2;
      phase_e ph;
      int sl;
      if (r == 0) begin ph = PH_RESET; sl = -1; end
      else if (r <= T) begin ph = PH_INTEG; sl = r - 1; end
      else if (r <= 2 * T) begin ph = PH_CONV; sl = r - T - 1; end
      else if (r == 2 * T + 1) begin ph = PH_READ; sl = -1; end
      else begin ph = PH_WRITE; sl = -1; end
      if (k == 100) start = 1'b1;           // ignored while busy
      if (k == 101) start = 1'b0;
      expect_eq("phase", int'(phase), int'(ph), k);
      if (sl >= 0) expect_eq("slot", int'(slot), sl, k);
      expect_eq("out_col", int'(out_col), j, k);
      expect_eq("rf_col", int'(rf_col), c, k);
      expect_eq("neg", int'(neg), s, k);
      expect_eq("in_col", int'(in_col), j + c, k);
      expect_eq("first", int'(first), int'(!acc_mode && c == 0 && s == 0), k);
      expect_eq("busy", int'(busy), 1, k);
      expect_eq("done", int'(done), 0, k);
      @(negedge clk);
    end
    expect_eq("done at end", int'(done), 1, OPS * CYC);
    expect_eq("busy at end", int'(busy), 0, OPS * CYC);
    @(negedge clk);
    expect_eq("done one clock", int'(done), 0, OPS * CYC + 1);
    expect_eq("stays idle", int'(phase), int'(PH_IDLE), OPS * CYC + 1);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_eq("idle after reset", int'(phase), int'(PH_IDLE), 0);
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * OPS * CYC + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
