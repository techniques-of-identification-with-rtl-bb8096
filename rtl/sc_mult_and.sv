// sc_mult_and: unipolar stochastic multiplier.
//
// For independent lines with p(a)=Ea/V and p(b)=Eb/V, the AND of the lines is ON with
// probability Ea*Eb/V^2, the product. Combinational. Follows the source design.
module sc_mult_and (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = a & b;
endmodule
