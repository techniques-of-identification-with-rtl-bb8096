// sc_inverter: stochastic arithmetic inversion (multiply by -1).
//
// Bipolar (single line) quantities are inverted by a logic NOT: p(ON) = E/2V + 1/2 becomes
// -E/2V + 1/2. Ternary quantities are inverted by exchanging the UP and DOWN lines, which
// also turns an UP/DOWN count request round. Both paths are present; an instance uses the one
// it needs. Purely combinational, no clock. Follows the source design directly.
module sc_inverter (
  input  logic          b_in,    // bipolar line
  output logic          b_out,   // inverted bipolar line
  input  sc_pkg::tern_t t_in,    // ternary pair
  output sc_pkg::tern_t t_out    // inverted ternary pair
);
  always_comb begin
    b_out    = ~b_in;
    t_out.up = t_in.dn;
    t_out.dn = t_in.up;
  end
endmodule
