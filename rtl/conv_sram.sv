// conv_sram: partial-sum and result memory of the convolution chip.
//
// Holds one W-bit value per output pixel. A word is one output column: the
// N pixels produced in parallel by the N neuron circuits, so one read and one
// write per operation cycle serve all DASs at once. With the chip's sizes
// (81 words of 81 x 6 bits) it is 39,366 bits, the 39 kb SRAM of the chip.
// The word organisation is this design's choice.
//
// Single port, synchronous: with en high, we high writes wdata to addr at
// the rising edge; with en high and we low, rdata shows the word at addr from
// the following cycle and holds until the next read.
module conv_sram #(
  parameter int unsigned DEPTH = 81,
  parameter int unsigned WIDTH = 486
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we)
        mem[addr] <= wdata;
      else
        rdata <= mem[addr];
    end
  end

endmodule
