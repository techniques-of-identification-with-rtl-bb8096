// sc_mult_xnor: bipolar stochastic multiplier.
//
// For independent bipolar lines, the output of an inverted exclusive OR (ON when its inputs
// are equal) has p(ON) = Ea*Eb/2V^2 + 1/2, the bipolar code of the product.
// Combinational. Follows the source design.
module sc_mult_xnor (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = ~(a ^ b);
endmodule
