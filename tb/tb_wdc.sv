// tb_wdc: self-checking test of the PWM/digital converter.
//
// Drives pulses of random width and position inside and outside the
// conversion window and checks the count against the number of enabled high
// slots, including a window longer than full scale (saturation at 2^W-1),
// the clear and the hold after the window closes.
module tb_wdc;
  localparam int W = 6;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0, pwm = 1'b0;
  logic [W-1:0] count;

  wdc #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic window(int len, int lo, int hi, int pre);
    int expct = 0;
    @(negedge clk); clr = 1'b1;
    @(negedge clk); clr = 1'b0;
    // pulse outside the window must not count
    repeat (pre) begin
      @(negedge clk); pwm = 1'b1; en = 1'b0;
    end
    for (int t = 0; t < len; t++) begin
      @(negedge clk);
      en  = 1'b1;
      pwm = (t >= lo && t < hi);
      if (pwm) expct++;
    end
    @(negedge clk); en = 1'b0; pwm = 1'b1;
    @(negedge clk); pwm = 1'b0;
    if (expct > (1 << W) - 1) expct = (1 << W) - 1;
    checks++;
    if (int'(count) != expct) begin
      failures++;
      $display("FAIL len=%0d lo=%0d hi=%0d count=%0d expected %0d", len, lo, hi, count, expct);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    window(63, 0, 0, 2);
    window(63, 0, 63, 0);
    window(63, 0, 17, 3);
    window(100, 0, 100, 0);      // saturates
    for (int n = 0; n < 200; n++) begin
      int lo, hi;
      lo = $urandom_range(0, 62);
      hi = $urandom_range(lo, 63);
      window(63, lo, hi, $urandom_range(0, 3));
    end
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
