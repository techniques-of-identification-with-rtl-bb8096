// sc_bayes_predictor: stochastic Bayes estimator and predictor for binary events.
//
// Predicts an event E from which of NEV events E_i occurred. With p0 = p(E), the likelihood
// ratio L = p(E|[e_i]) / p(not E|[e_i]) factors, if the e_i are independent under E, into
// L = L0 * prod(L_i) over the E_i that occurred, L0 = p0/(1-p0). Each factor is held as a
// probability in a stochastic integrator (sc_integrator) whose output line has that
// probability; an integrator with k inputs counts up only when all are ON and down only when
// all are OFF, so it settles where the product of ON probabilities equals that of OFF ones:
//   L0 integrator: inputs e, its own inverted output       -> p0          (an ADDIE)
//   p_i integrator: inputs e, inverted p0 output, its own inverted output;
//                   counts only when est is ON and E_i occurred -> p_i/(1-p_i) = L_i
//   predictor: inputs p0 output and the p_i outputs of the E_i that occurred (the others are
//              masked out), plus its own inverted output -> r/(1-r) = L, r = p(E | [e_i]).
// With ML_SWITCH = 1 the predictor is a switching function without feedback: its output is ON
// when L > 1, the maximum-likelihood prediction of E.
// Interface: est (Estimate line) and e, ei are sampled at each clock during estimation;
// predict enables the predictor integrator, which uses the current ei.
// Timing: all counts registered; outputs change only at clock edges.
// Structure and counting rules follow the source design; widths, seeds and the separate
// predict enable are this design's choices.
module sc_bayes_predictor #(
  parameter int unsigned NEV       = 4,
  parameter int unsigned W         = 8,
  parameter bit          ML_SWITCH = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             est,
  input  logic             e,
  input  logic [NEV-1:0]   ei,
  input  logic             predict,
  output logic             pred,
  output logic [W-1:0]     pred_count,
  output logic [W-1:0]     p0_count,
  output logic [W-1:0]     pi_count [NEV]
);
  logic           p0_out, p0_n, pred_n;
  logic [NEV-1:0] pi_out, pi_n;

  sc_inverter u_inv0 (.b_in(p0_out), .b_out(p0_n), .t_in('0), .t_out());
  sc_inverter u_invp (.b_in(pred),   .b_out(pred_n), .t_in('0), .t_out());

  sc_addie #(.W(W), .SEED(W'(8'h3B))) u_l0 (
    .clk, .rst_n, .hold(est), .x(e), .out(p0_out), .count(p0_count)
  );

  for (genvar i = 0; i < NEV; i++) begin : g_ev
    sc_inverter u_invi (.b_in(pi_out[i]), .b_out(pi_n[i]), .t_in('0), .t_out());
    sc_integrator #(.W(W), .NIN(3), .SEED(W'(8'h47 + 8'd29 * i))) u_li (
      .clk, .rst_n, .hold(est & ei[i]),
      .in({pi_n[i], p0_n, e}), .mask(3'b111),
      .out(pi_out[i]), .count(pi_count[i])
    );
  end

  sc_integrator #(.W(W), .NIN(NEV + 2), .SWITCH(ML_SWITCH), .SEED(W'(8'hC5))) u_pred (
    .clk, .rst_n, .hold(predict),
    .in({pred_n, pi_out, p0_out}), .mask({~ML_SWITCH, ei, 1'b1}),
    .out(pred), .count(pred_count)
  );
endmodule
