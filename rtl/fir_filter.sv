// fir_filter: direct-form N-tap FIR filter, y(n) = sum_{i=0}^{N-1} b_i x(n-i).
//
// The current sample x(n) and the N-1 previous samples held in a z^-1
// register chain (fir_delay_line) are each multiplied by a fixed coefficient.
// Tap 0 is a bare multiplier (fir_coeff_mult); taps 1..N-1 are
// multiply-accumulate cells (fir_mac_cell) that add their product to the
// running sum passed along from the tap before, so the adders form one chain
// and y(n) leaves the last cell. This is the convolution of the coefficient
// sequence with the input.
//
// Interface: clk, rst (synchronous, active high, clears the delay line),
// x_in (signed DW bits), y_out (signed OW bits). Defaults: 4 taps, 8-bit
// input, 16-bit output, coefficients {3, 1, 2, 1}, all from the filter's
// specification; the 8-bit signed coefficient width is this design's own.
//
// Timing: one sample per clock. The data path after the registers is
// combinational, as in the direct form: y_out shows y(n) for the x_in
// presented in the same cycle, and x_in is shifted into the delay line at the
// next rising edge. Sums wrap modulo 2^OW (two's complement); with the default
// coefficients |y| <= 7 * 128, so no overflow can occur at the defaults.
// The critical path is one multiplier plus N-1 adders and grows with N.
module fir_filter #(
  parameter int unsigned NTAPS = fir_pkg::NTAPS_DEF,
  parameter int unsigned DW    = fir_pkg::DW_DEF,
  parameter int unsigned CW    = fir_pkg::CW_DEF,
  parameter int unsigned OW    = fir_pkg::OW_DEF,
  parameter logic signed [CW-1:0] COEFFS [NTAPS] = fir_pkg::COEFFS_DEF
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [DW-1:0] x_in,
  output logic signed [OW-1:0] y_out
);

  // The direct form needs at least one delay stage.
  initial begin
    assert (NTAPS >= 2) else $error("fir_filter: NTAPS must be at least 2");
  end

  logic signed [DW-1:0]    xd   [NTAPS-1];  // xd[k] = x(n-1-k)
  logic signed [DW+CW-1:0] p0;              // b0 * x(n)
  logic signed [OW-1:0]    acc  [NTAPS];    // acc[i] = sum_{j<=i} b_j x(n-j)

  fir_delay_line #(.DEPTH(NTAPS-1), .DW(DW)) u_delay (
    .clk  (clk),
    .rst  (rst),
    .din  (x_in),
    .taps (xd)
  );

  fir_coeff_mult #(.DW(DW), .CW(CW), .COEFF(COEFFS[0])) u_tap0 (
    .x (x_in),
    .p (p0)
  );

  always_comb acc[0] = OW'(p0);

  for (genvar i = 1; i < int'(NTAPS); i++) begin : g_tap
    fir_mac_cell #(.DW(DW), .CW(CW), .OW(OW), .COEFF(COEFFS[i])) u_mac (
      .x       (xd[i-1]),
      .acc_in  (acc[i-1]),
      .acc_out (acc[i])
    );
  end

  assign y_out = acc[NTAPS-1];

endmodule
