// weight_setting: behavioural model of one weight setting circuit (analog
// output; not synthesizable logic).
//
// The chip has M of these, one per synapse row. All N neurons share them,
// because every neuron of a feature class has the same receptive-field
// weights. Each circuit latches one signed kernel weight per operation cycle
// and drives the DC gate voltage V_w of transistor M1 in the synapses of its
// row. A neuron synapse has one sign only, so the circuit outputs the
// magnitude of the weight during the pass of its own sign and a zero weight
// during the other pass.
//
// V_w falls linearly with the magnitude: full scale 2^(WB-1) gives 1.6 V
// (the largest weight the chip was measured with); zero gives VW_ZERO,
// assumed 2.8 V, just above the 2.7 V of the smallest measured weight. The
// linear code-to-voltage law and VW_ZERO are this model's assumptions.
//
// Interface: on a rising clk edge with load high, code (two's complement, WB
// bits) and neg (the pass's sign) are latched; vw follows immediately after.
module weight_setting
  import cnn_pkg::*;
#(
  parameter int unsigned WB = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic signed [WB-1:0] code,
  input  logic                 neg,
  output real                  vw
);

  logic [WB-1:0] mag_q;   // magnitude for the current pass, 0 .. 2^(WB-1)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      mag_q <= '0;
    else if (load) begin
      if (neg)
        mag_q <= (code < 0) ? WB'(-code) : '0;
      else
        mag_q <= (code > 0) ? WB'(code) : '0;
    end
  end

  localparam real FULL = real'(1 << (WB - 1));

  always_comb vw = VW_ZERO - (VW_ZERO - VW_MAX_WEIGHT) * (real'(mag_q) / FULL);

endmodule
