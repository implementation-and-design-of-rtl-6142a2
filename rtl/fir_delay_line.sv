// fir_delay_line: the chain of z^-1 sample registers of an FIR filter.
//
// On every rising clock edge the input sample enters the first register and
// each register passes its value to the next, so taps[k] holds x(n-1-k): the
// sample from k+1 clocks ago. A synchronous active-high reset clears every
// register to zero, which is the "x[n] = 0 for n < 0" state the filter starts
// from.
//
// Ports: clk, rst, din (signed DW) in; taps[DEPTH] (signed DW each) out.
// Timing: one sample per clock; taps change only at the clock edge.
// The register chain follows the filter's data-flow graph; the reset and the
// one-sample-per-clock rate (no clock enable) are this design's choices.
module fir_delay_line #(
  parameter int unsigned DEPTH = fir_pkg::NTAPS_DEF - 1,
  parameter int unsigned DW    = fir_pkg::DW_DEF
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [DW-1:0] din,
  output logic signed [DW-1:0] taps [DEPTH]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < int'(DEPTH); k++) taps[k] <= '0;
    end else begin
      taps[0] <= din;
      for (int k = 1; k < int'(DEPTH); k++) taps[k] <= taps[k-1];
    end
  end

endmodule
