// sc_mult_ternary: ternary (UP/DOWN) stochastic multiplier.
//
// UP out is ON when both UP inputs or both DOWN inputs are ON; DOWN out is ON when one UP
// and one DOWN input are ON. For independent inputs E/V = p(UP)-p(DOWN) then multiplies.
// Combinational. The gating follows the source design.
module sc_mult_ternary (
  input  sc_pkg::tern_t a,
  input  sc_pkg::tern_t b,
  output sc_pkg::tern_t y
);
  always_comb begin
    y.up = (a.up & b.up) | (a.dn & b.dn);
    y.dn = (a.up & b.dn) | (a.dn & b.up);
  end
endmodule
