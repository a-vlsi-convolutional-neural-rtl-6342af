// conv_chip: convolution chip built from PWM neuron circuits and digital
// accumulation (merged analog-digital architecture).
//
// One call computes an N x N output feature class from an NP x NP input
// (NP = N + M - 1, the border pixels being zero) with an M x M kernel:
//   y[i][j] = sum_{k,c < M} w[k][c] * f(x[i+k][j+c])
// N neuron circuits of M synapses work in parallel on one output column j:
// neuron i takes input rows i..i+M-1 of input column j+c, and the M weight
// setting circuits hold kernel column c for all neurons. Each (j, c) is run
// once with the positive and once with the negative weights; each neuron's
// output pulse is counted by its WDC and added or subtracted by its DAS to
// the pixel's partial sum in the SRAM. N*M*2 operation cycles make one
// convolution (3240 at the default sizes, about 5.2 ms at 1.6 us per cycle).
//
// What comes from outside (the external feedback control of the document):
//   in_pwm[r]  PWM pulse of input row r of column in_col, high for the first
//              x slots of PH_INTEG for an input value x (0 .. 2^W-1); rows
//              outside the image are held low (zero).
//   w_code[k]  signed weight w[k][rf_col], sampled in PH_RESET.
//   vf, vref   the shared analog waveforms V_F (nonlinearity) and V_ref
//              (ramp), as functions of slot in PH_INTEG and PH_CONV.
// Results are read out while busy is low: rd_en/rd_addr = j gives output
// column j on rd_data one clock later, rd_data[i] being pixel (i, j) as a
// W-bit two's complement value. ovf reports that some partial sum of the
// last convolution saturated at the W-bit range.
//
// The array sizes, the sign-split time-sharing schedule, the WDC/DAS/SRAM
// data path and the 6-bit precision follow the document. The pin-level
// protocol, the SRAM word layout, the phase timing and the saturating
// accumulation are this design's choices. The neurons and weight setting
// circuits are behavioural models of analog circuits.
module conv_chip
  import cnn_pkg::*;
#(
  parameter int unsigned N  = N_DEF,
  parameter int unsigned M  = M_DEF,
  parameter int unsigned W  = W_DEF,
  localparam int unsigned NP = N + M - 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // convolution control
  input  logic                        start,
  input  logic                        accum,
  output logic                        busy,
  output logic                        done,
  output logic                        ovf,
  // operation-cycle status for the external controller
  output phase_e                      phase,
  output logic [W-1:0]                slot,
  output logic [$clog2(NP)-1:0]       in_col,
  output logic [$clog2(M)-1:0]        rf_col,
  output logic                        neg,
  // inputs and weights of the current operation cycle
  input  logic [NP-1:0]               in_pwm,
  input  logic signed [M-1:0][W-1:0]  w_code,
  input  real                         vf,
  input  real                         vref,
  // result readout
  input  logic                        rd_en,
  input  logic [$clog2(N)-1:0]        rd_addr,
  output logic [N-1:0][W-1:0]         rd_data
);

  logic [$clog2(N)-1:0] out_col;
  logic                 first;
  logic                 discharge, integ, conv;

  ts_ctrl #(.N(N), .M(M), .W(W)) u_ctrl (
    .clk, .rst_n, .start, .accum, .busy, .done, .phase, .slot,
    .out_col, .rf_col, .in_col, .neg, .first
  );

  assign discharge = (phase == PH_RESET);
  assign integ     = (phase == PH_INTEG);
  assign conv      = (phase == PH_CONV);

  // Weight setting circuits: one per synapse row, shared by all neurons.
  real vw [M];
  for (genvar k = 0; k < int'(M); k++) begin : g_ws
    weight_setting #(.WB(W)) u_ws (
      .clk, .rst_n, .load(discharge), .code(w_code[k]), .neg, .vw(vw[k])
    );
  end

  // SRAM: word j holds output column j.
  logic [N-1:0][W-1:0] mem_rdata, mem_wdata;
  logic                mem_en, mem_we;
  logic [$clog2(N)-1:0] mem_addr;

  assign mem_en   = busy ? (phase == PH_READ || phase == PH_WRITE) : rd_en;
  assign mem_we   = (phase == PH_WRITE);
  assign mem_addr = busy ? out_col : rd_addr;

  conv_sram #(.DEPTH(N), .WIDTH(N * W)) u_sram (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr),
    .wdata(mem_wdata), .rdata(mem_rdata)
  );

  assign rd_data = mem_rdata;

  // Neuron columns: neuron, WDC and DAS per output row.
  logic [N-1:0] sat;

  for (genvar i = 0; i < int'(N); i++) begin : g_col
    logic         pwm_out;
    logic [W-1:0] cnt;
    real          v_cap;

    pwm_neuron #(.M(M)) u_neuron (
      .clk, .discharge, .integ, .conv,
      .pwm_in(in_pwm[i +: M]), .vw, .vf, .vref,
      .pwm_out, .v_cap
    );

    wdc #(.W(W)) u_wdc (
      .clk, .rst_n, .clr(discharge), .en(conv), .pwm(pwm_out), .count(cnt)
    );

    das #(.W(W)) u_das (
      .acc_in(mem_rdata[i]), .cnt, .sub(neg), .load(first),
      .acc_out(mem_wdata[i]), .sat(sat[i])
    );
  end

  // Overflow: some partial sum saturated during the current (or last)
  // convolution. Cleared when a convolution starts.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      ovf <= 1'b0;
    else if (start && !busy)
      ovf <= 1'b0;
    else if (mem_we && (|sat))
      ovf <= 1'b1;
  end

  // The SRAM is never written outside a convolution.
  a_no_idle_write: assert property (@(posedge clk) disable iff (!rst_n)
                                    mem_we |-> busy);

endmodule
