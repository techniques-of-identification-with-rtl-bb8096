// sc_addie: ADDIE, a stochastic integrator with negative feedback used as an estimator.
//
// A two-input sc_integrator whose second input is its own output through an sc_inverter.
// The count goes up when x is ON and the output is OFF, and down when x is OFF and the
// output is ON, so in equilibrium the output probability, and the fractional count k/N,
// equal p(x ON): an unbiased estimate with a time constant of about N clocks and final
// variance p(1-p)/N. It behaves as a first-order lag 1/(s+1) on the represented quantity.
// Interface: hold enables estimation; count is the parallel (outward) reading, out the
// stochastic re-coding of the estimate. Follows the source design; width and seed are choices.
module sc_addie #(
  parameter int unsigned  W    = 8,
  parameter logic [W-1:0] SEED = 8'h2B
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         hold,
  input  logic         x,
  output logic         out,
  output logic [W-1:0] count
);
  logic out_n;

  sc_inverter u_inv (.b_in(out), .b_out(out_n), .t_in('0), .t_out());

  sc_integrator #(.W(W), .NIN(2), .SWITCH(1'b0), .SEED(SEED)) u_int (
    .clk, .rst_n, .hold,
    .in({out_n, x}), .mask(2'b11),
    .out, .count
  );
endmodule
