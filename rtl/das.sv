// das: digital adder-subtracter (DAS), one per neuron circuit.
//
// Accumulates the WDC result of one operation cycle into the partial sum of
// one output pixel. The analog neuron can only apply one weight sign at a
// time, so each receptive-field column is run twice: the result of the pass
// with the positive weights is added, that of the pass with the negative
// weights subtracted. With load high the partial sum read from memory is
// ignored and the (signed) count starts a new sum; that is how the first
// pass of a convolution clears the old contents.
//
// Combinational. acc_in/acc_out are W-bit two's complement; the result
// saturates to the W-bit range and sat flags when it did. The W-bit width
// follows from the chip's memory size (one 6-bit word per output pixel);
// saturation rather than wrap-around is this design's choice.
module das #(
  parameter int unsigned W = 6
) (
  input  logic signed [W-1:0] acc_in,
  input  logic        [W-1:0] cnt,
  input  logic                sub,
  input  logic                load,
  output logic signed [W-1:0] acc_out,
  output logic                sat
);

  localparam logic signed [W+1:0] MAXV = (W+2)'((1 << (W-1)) - 1);
  localparam logic signed [W+1:0] MINV = -(W+2)'(1 << (W-1));

  logic signed [W+1:0] base, term, sum;

  always_comb begin
    base = load ? '0 : (W+2)'(acc_in);
    term = $signed({2'b00, cnt});
    sum  = sub ? (base - term) : (base + term);
    sat  = 1'b0;
    if (sum > MAXV) begin
      acc_out = MAXV[W-1:0];
      sat     = 1'b1;
    end else if (sum < MINV) begin
      acc_out = MINV[W-1:0];
      sat     = 1'b1;
    end else begin
      acc_out = sum[W-1:0];
    end
  end

endmodule
