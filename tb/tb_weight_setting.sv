// tb_weight_setting: self-checking test of the weight setting model.
//
// For every signed 6-bit code and both pass signs it checks that the latched
// magnitude maps to V_w = 2.8 V - 1.2 V * |w| / 32 during the pass of the
// weight's own sign and to the zero-weight voltage 2.8 V during the other,
// that full scale gives the chip's 1.6 V, and that the output holds while
// load is low.
module tb_weight_setting;
  localparam int WB = 6;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, neg = 1'b0;
  logic signed [WB-1:0] code = '0;
  real vw;

  weight_setting #(.WB(WB)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(real e, string what);
    checks++;
    if (vw > e + 1e-9 || vw < e - 1e-9) begin
      failures++;
      if (failures < 10) $display("FAIL %s: vw=%f expected %f", what, vw, e);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk(2.8, "after reset");
    for (int c = -32; c < 32; c++)
      for (int s = 0; s < 2; s++) begin
        int mag;
        @(negedge clk); load = 1'b1; code = WB'(c); neg = s[0];
        @(negedge clk); load = 1'b0;
        mag = (s == 0) ? (c > 0 ? c : 0) : (c < 0 ? -c : 0);
        chk(2.8 - 1.2 * real'(mag) / 32.0, "code");
        code = WB'(c + 1); neg = ~neg;
        @(negedge clk);
        chk(2.8 - 1.2 * real'(mag) / 32.0, "hold");
      end
    @(negedge clk); load = 1'b1; code = -32; neg = 1'b1;
    @(negedge clk); load = 1'b0;
    chk(1.6, "full scale");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
