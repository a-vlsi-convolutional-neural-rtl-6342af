// cnn_pkg: constants and types shared by the PWM convolution chip.
//
// The chip computes one convolution between feature classes of a
// hierarchical convolutional network: an N x N output feature class from an
// NP x NP input (NP = N + M - 1) with an M x M kernel. Its default sizes are
// those of the fabricated chip: 81 neuron circuits of 20 synapses, a
// 100 x 100 input and 6-bit precision. The phase encoding, the slot count per
// PWM window and the analog reference values below are this design's own
// choices, except the 1.6 V / 2.7 V weight-voltage range, which is the
// measured range of the chip.
package cnn_pkg;

  // Default array sizes (neurons, synapses per neuron, value precision).
  localparam int unsigned N_DEF  = 81;
  localparam int unsigned M_DEF  = 20;
  localparam int unsigned NP_DEF = N_DEF + M_DEF - 1;
  localparam int unsigned W_DEF  = 6;

  // Phases of one operation cycle of the time-sharing sequencer.
  //   PH_IDLE  : nothing running, SRAM open to external readout
  //   PH_RESET : integrating capacitors discharged, WDCs cleared, weights latched
  //   PH_INTEG : input PWM pulses integrated on the capacitors (2^W-1 slots)
  //   PH_CONV  : capacitor voltage compared with the V_ref ramp, WDCs count
  //   PH_READ  : partial sums of one output column read from the SRAM
  //   PH_WRITE : DAS results written back to the SRAM
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,
    PH_RESET = 3'd1,
    PH_INTEG = 3'd2,
    PH_CONV  = 3'd3,
    PH_READ  = 3'd4,
    PH_WRITE = 3'd5
  } phase_e;

  // Analog reference values used by the behavioural models (volts).
  localparam real VW_MAX_WEIGHT = 1.6;  // V_w of the largest weight (measured range)
  localparam real VW_ZERO       = 2.8;  // V_w at which M1 stops conducting (the smallest
                                        // measured weight is at 2.7 V)
  localparam real VF_OFF        = 2.7;  // V_F above which M2 is off (VDD - |Vtp|)
  localparam real VF_FULL       = 0.0;  // V_F at which M2 conducts fully

endpackage
