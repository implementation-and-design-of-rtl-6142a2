// fir_coeff_mult: fixed-coefficient multiplier, one of the triangles b_i of
// the direct-form FIR data path.
//
// It forms p = COEFF * x as a full-precision signed product (DW + CW bits), so
// no bits are lost here; any narrowing to the filter's output width happens in
// the accumulation. The coefficient is a parameter, so a synthesis tool can
// reduce the multiplier to shifts and adds. Purely combinational: p follows x
// in the same cycle.
//
// Ports: x (signed, DW bits) in, p (signed, DW+CW bits) out.
// The product width and the constant coefficient are this design's choices;
// the filter description only says that each sample is multiplied by its
// coefficient.
module fir_coeff_mult #(
  parameter int unsigned DW = fir_pkg::DW_DEF,
  parameter int unsigned CW = fir_pkg::CW_DEF,
  parameter logic signed [CW-1:0] COEFF = CW'(3)
) (
  input  logic signed [DW-1:0]    x,
  output logic signed [DW+CW-1:0] p
);

  always_comb begin
    p = (DW+CW)'(x) * (DW+CW)'(COEFF);
  end

endmodule
