// sc_descent_channel: one weight channel of the stochastic steepest-descent identifier.
//
// Adjusts one weight w so as to reduce the error E = sum(w_i X_i) - Z, following
//   dw/dt = -alpha * sgn(E + gamma) * sgn(X + delta)        (mode = 0, stochastic binary)
//   dw/dt = -alpha * sgn(E) sgn(X) [|E| > |gamma|] [|X| > |delta|]   (mode = 1, stochastic ternary)
// In mode 0 each of E and X is compared, through sc_d2s, with its own dither to give a
// bipolar line; the lines are multiplied by an sc_mult_xnor, and the product steps the weight
// counter down when the signs agree and up when they differ. With the dither amplitude at
// zero this is polarity-coincidence correlation. In mode 1 E and X are re-coded as ternary
// lines (sign, and magnitude against the dither magnitude), multiplied by sc_mult_ternary and
// fed to the counter through an sc_inverter (the minus sign).
// The counter is an sc_integrator_ternary of WW bits; weight is its signed count. alpha is one
// counter step, so the weight scale (set by the user of the count) fixes the adaption gain.
// Interface: e, x are signed EW-bit samples taken at each clock; gamma, delta come from an
// sc_sawtooth; adapt enables adaption. Timing: weight is registered, one step per clock.
// The structure follows the source design; the digital sampling of E and X, widths and the
// use of the counter's full range are this design's choices.
module sc_descent_channel #(
  parameter int unsigned WW = 16,
  parameter int unsigned EW = 8,
  parameter logic [WW-2:0] SEED = 15'h1A3C
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 adapt,
  input  logic                 mode,
  input  logic signed [EW-1:0] e,
  input  logic signed [EW-1:0] x,
  input  logic signed [EW-1:0] gamma,
  input  logic signed [EW-1:0] delta,
  output logic signed [WW-1:0] weight
);
  import sc_pkg::*;

  localparam logic [EW-1:0] MID = EW'(1) << (EW-1);

  logic          e_bin, x_bin, prod_bin;
  tern_t         e_t, x_t, prod_t, step_bin, step_t, step;
  logic [EW-1:0] e_off, x_off, g_rnd, d_rnd;
  logic [EW-2:0] g_mag, d_mag;

  always_comb begin
    // offset-binary forms: rnd <= value  <=>  E + gamma >= 0
    e_off = e ^ MID;
    x_off = x ^ MID;
    g_rnd = MID - gamma;
    d_rnd = MID - delta;
    g_mag = gamma[EW-1] ? ~gamma[EW-2:0] : gamma[EW-2:0];
    d_mag = delta[EW-1] ? ~delta[EW-2:0] : delta[EW-2:0];
  end

  sc_d2s #(.W(EW)) u_e2s (.value(e_off), .rnd(g_rnd), .bin_out(e_bin),
                          .svalue(e), .rnd_t(g_mag), .tern_out(e_t));
  sc_d2s #(.W(EW)) u_x2s (.value(x_off), .rnd(d_rnd), .bin_out(x_bin),
                          .svalue(x), .rnd_t(d_mag), .tern_out(x_t));

  sc_mult_xnor    u_mb (.a(e_bin), .b(x_bin), .y(prod_bin));
  sc_mult_ternary u_mt (.a(e_t), .b(x_t), .y(prod_t));

  // bipolar product as a counting request: ON -> count up, OFF -> count down; inverted below
  assign step_bin = '{up: prod_bin, dn: ~prod_bin};
  assign step_t   = mode ? prod_t : step_bin;

  sc_inverter u_neg (.b_in(1'b0), .b_out(), .t_in(step_t), .t_out(step));

  sc_integrator_ternary #(.W(WW), .SEED(SEED)) u_w (
    .clk, .rst_n, .hold(adapt), .a(step), .b('0), .out(), .count(weight)
  );
endmodule
