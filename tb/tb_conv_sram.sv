// tb_conv_sram: self-checking test of the result memory.
//
// Writes random words to every address at the default size (81 x 486 bits),
// reads them back in random order, and checks the one-cycle read latency
// and that rdata holds while the memory is disabled or being written.
module tb_conv_sram;
  localparam int DEPTH = 81;
  localparam int WIDTH = 486;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;

  conv_sram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] v;
    for (int b = 0; b < WIDTH; b += 32) v[b +: 32] = $urandom();
    return v;
  endfunction

  task automatic rd(int a);
    @(negedge clk); en = 1'b1; we = 1'b0; addr = AW'(a);
    @(negedge clk); en = 1'b0;
    checks++;
    if (rdata !== ref_mem[a]) begin
      failures++;
      $display("FAIL read addr %0d", a);
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      ref_mem[a] = rnd();
      @(negedge clk); en = 1'b1; we = 1'b1; addr = AW'(a); wdata = ref_mem[a];
    end
    @(negedge clk); en = 1'b0; we = 1'b0;
    for (int n = 0; n < 300; n++) rd($urandom_range(0, DEPTH - 1));
    // rdata holds while idle and while writing
    rd(5);
    repeat (3) @(negedge clk);
    ref_mem[6] = rnd();
    en = 1'b1; we = 1'b1; addr = 6; wdata = ref_mem[6];
    @(negedge clk); en = 1'b0; we = 1'b0;
    checks++;
    if (rdata !== ref_mem[5]) begin failures++; $display("FAIL rdata not held"); end
    rd(6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
