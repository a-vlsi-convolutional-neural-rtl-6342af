// wdc: PWM/digital converter (WDC), one per neuron circuit.
//
// Converts the width of the neuron's output PWM pulse into a W-bit number by
// counting the clock slots in which the pulse is high while the conversion
// window is open. The neuron produces its pulse by comparing its capacitor
// voltage with a linear ramp, so the count is the capacitor voltage in ramp
// steps. The document names the WDC and its job; the slot counter is this
// design's own, simplest way of doing it.
//
// Interface: clr (synchronous, one cycle before the window) zeroes the
// count; while en is high the count advances on every rising clock edge at
// which pwm is high, saturating at 2^W-1. count is valid the cycle after the
// window closes and holds until the next clr.
module wdc #(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         pwm,
  output logic [W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      count <= '0;
    else if (clr)
      count <= '0;
    else if (en && pwm && (count != {W{1'b1}}))
      count <= count + 1'b1;
  end

endmodule
