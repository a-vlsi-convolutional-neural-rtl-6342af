// ts_ctrl: time-sharing sequencer of the convolution chip.
//
// The chip has N neuron circuits of M synapses, far fewer than the N*N*M*M
// connections of one convolution, so the neurons are reused. In one operation
// cycle, neuron i receives rows i..i+M-1 of one input column and forms the
// weighted sum over one column of the receptive field. The sequencer walks
// the output columns j = 0..N-1, and for each the receptive-field columns
// c = 0..M-1 (input column j+c), and runs every (j, c) twice: with the
// positive and with the negative weights. A convolution therefore takes
// N*M*2 operation cycles, the count the document gives.
//
// One operation cycle is 2*T+3 clocks, T = 2^W-1:
//   PH_RESET  1 clock  capacitors discharged, WDCs cleared, weights latched
//   PH_INTEG  T clocks input pulses integrated, slot = 0..T-1
//   PH_CONV   T clocks ramp comparison counted by the WDCs, slot = 0..T-1
//   PH_READ   1 clock  SRAM word j read
//   PH_WRITE  1 clock  DAS results written to SRAM word j
// The phase split, the one-clock-per-slot timing and the loop order (sign
// innermost) are this design's choices; the document gives the loop bounds
// and that both signs are run for each receptive-field column. With 129
// clocks per cycle, an 80.6 MHz clock gives the chip's 1.6 us cycle.
//
// start (with busy low) begins a convolution; accum high makes it add to the
// SRAM contents (to sum the convolutions of several input feature classes, or
// to split a larger receptive field into several runs) instead of starting
// from zero. done pulses for one clock after the last write. first is high
// for the pass that loads instead of accumulating.
module ts_ctrl
  import cnn_pkg::*;
#(
  parameter int unsigned N = N_DEF,
  parameter int unsigned M = M_DEF,
  parameter int unsigned W = W_DEF,
  localparam int unsigned NP = N + M - 1,
  localparam int unsigned T  = (1 << W) - 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     accum,
  output logic                     busy,
  output logic                     done,
  output phase_e                   phase,
  output logic [W-1:0]             slot,
  output logic [$clog2(N)-1:0]     out_col,
  output logic [$clog2(M)-1:0]     rf_col,
  output logic [$clog2(NP)-1:0]    in_col,
  output logic                     neg,
  output logic                     first
);

  logic accum_q;

  assign busy   = (phase != PH_IDLE);
  assign in_col = $clog2(NP)'(out_col) + $clog2(NP)'(rf_col);
  assign first  = !accum_q && (rf_col == '0) && !neg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= PH_IDLE;
      slot    <= '0;
      out_col <= '0;
      rf_col  <= '0;
      neg     <= 1'b0;
      accum_q <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        PH_IDLE: begin
          if (start) begin
            phase   <= PH_RESET;
            out_col <= '0;
            rf_col  <= '0;
            neg     <= 1'b0;
            accum_q <= accum;
          end
        end
        PH_RESET: begin
          phase <= PH_INTEG;
          slot  <= '0;
        end
        PH_INTEG: begin
          if (slot == W'(T - 1)) begin
            phase <= PH_CONV;
            slot  <= '0;
          end else begin
            slot <= slot + 1'b1;
          end
        end
        PH_CONV: begin
          if (slot == W'(T - 1)) begin
            phase <= PH_READ;
            slot  <= '0;
          end else begin
            slot <= slot + 1'b1;
          end
        end
        PH_READ: phase <= PH_WRITE;
        PH_WRITE: begin
          phase <= PH_RESET;
          if (!neg) begin
            neg <= 1'b1;
          end else begin
            neg <= 1'b0;
            if (rf_col == $clog2(M)'(M - 1)) begin
              rf_col <= '0;
              if (out_col == $clog2(N)'(N - 1)) begin
                out_col <= '0;
                phase   <= PH_IDLE;
                done    <= 1'b1;
              end else begin
                out_col <= out_col + 1'b1;
              end
            end else begin
              rf_col <= rf_col + 1'b1;
            end
          end
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  // The sequencer never leaves the receptive field or the output range.
  a_rf_range:  assert property (@(posedge clk) disable iff (!rst_n) int'(rf_col) < int'(M));
  a_col_range: assert property (@(posedge clk) disable iff (!rst_n) int'(out_col) < int'(N));

endmodule
