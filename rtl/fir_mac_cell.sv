// fir_mac_cell: multiply-accumulate cell of the direct-form FIR filter (one
// boxed multiplier + adder pair of the data-flow graph).
//
// The cell multiplies its delayed sample x(n-i) by the fixed coefficient b_i
// (through fir_coeff_mult) and adds the product to the partial sum coming from
// the previous cell: acc_out = acc_in + b_i * x(n-i). The product is
// sign-extended (or, if OW is smaller than DW+CW, truncated) to the OW-bit
// accumulator, and the addition wraps modulo 2^OW, which is ordinary
// two's-complement arithmetic at the output width. Purely combinational.
//
// Ports: x (signed DW), acc_in (signed OW) in; acc_out (signed OW) out.
// The multiply-then-add structure follows the filter description; the
// wrap-around on overflow is this design's choice.
module fir_mac_cell #(
  parameter int unsigned DW = fir_pkg::DW_DEF,
  parameter int unsigned CW = fir_pkg::CW_DEF,
  parameter int unsigned OW = fir_pkg::OW_DEF,
  parameter logic signed [CW-1:0] COEFF = CW'(1)
) (
  input  logic signed [DW-1:0] x,
  input  logic signed [OW-1:0] acc_in,
  output logic signed [OW-1:0] acc_out
);

  logic signed [DW+CW-1:0] prod;

  fir_coeff_mult #(.DW(DW), .CW(CW), .COEFF(COEFF)) u_mult (
    .x (x),
    .p (prod)
  );

  always_comb begin
    acc_out = acc_in + OW'(prod);
  end

endmodule
