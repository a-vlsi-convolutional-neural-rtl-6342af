// tb_das: exhaustive self-checking test of the digital adder-subtracter.
//
// Applies every combination of partial sum, count, add/subtract and load
// for W = 6 and compares the result and saturation flag with integer
// arithmetic clamped to [-32, 31].
module tb_das;
  localparam int W = 6;

  logic signed [W-1:0] acc_in, acc_out;
  logic [W-1:0] cnt;
  logic sub, load, sat;

  das #(.W(W)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int a = -32; a < 32; a++)
      for (int c = 0; c < 64; c++)
        for (int m = 0; m < 4; m++) begin
          int e;
          bit es;
          acc_in = W'(a); cnt = W'(c); sub = m[0]; load = m[1];
          #1;
          e  = (load ? 0 : a) + (sub ? -c : c);
          es = 0;
          if (e > 31)  begin e = 31;  es = 1; end
          if (e < -32) begin e = -32; es = 1; end
          checks++;
          if (int'(acc_out) != e || sat != es) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%0d c=%0d sub=%0b load=%0b -> %0d/%0b expected %0d/%0b",
                       a, c, sub, load, acc_out, sat, e, es);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
