// sc_identification_top: stochastic identification computer.
//
// Five sections stand side by side, each with its own ports: a conversion section and four
// identifiers.
//   1. an inward/outward conversion and arithmetic section: a ramp converter (sc_ramp_adc,
//      with the external DAC and comparator on ports) turns an analog level into a count, an
//      sc_d2s with its own noise source re-codes it as a random line, which can be multiplied
//      by an external line (sc_mult_and), summed with another (sc_summer, sc_summer_lv), and
//      read back out as a parallel count by an ADDIE (sc_addie), whose input is chosen by sel;
//   2. a steepest-descent linear identifier (sc_descent_identifier, NCH weights);
//   3. an adaptive threshold logic element (sc_atl);
//   4. a Bayes estimator and predictor (sc_bayes_predictor) for NEV binary events;
//   5. a Markov model of NS state classes (sc_markov_model).
// All sections share the clock and an active-low synchronous reset. The analog parts of the
// source design (the DAC and comparator of the converter, the strobe sampler, and the
// analog gains set by the weight counts) are outside; their signals are ports.
module sc_identification_top #(
  parameter int unsigned W   = 8,
  parameter int unsigned NCH = 2,
  parameter int unsigned EW  = 8,
  parameter int unsigned WW  = 16,
  parameter int unsigned WF  = 10,
  parameter int unsigned AW  = 4,
  parameter int unsigned NIN = 4,
  parameter int unsigned NEV = 4,
  parameter int unsigned NS  = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // 1. conversion and arithmetic section
  input  logic                   adc_start,
  input  logic                   adc_cmp,
  output logic [W-1:0]           adc_ramp,
  output logic                   adc_busy,
  output logic                   adc_done,
  output logic [W-1:0]           adc_value,
  input  logic                   line_b,
  input  logic                   line_c,
  input  logic [W-1:0]           lambda,
  input  logic [1:0]             sel,
  input  logic                   addie_hold,
  output logic                   s_in,
  output logic                   s_prod,
  output logic                   s_sum,
  output logic                   s_sum_lv,
  output logic                   addie_out,
  output logic [W-1:0]           addie_count,
  // 2. steepest-descent identifier
  input  logic                   id_adapt,
  input  logic                   id_mode,
  input  logic [AW:0]            id_amp,
  input  logic signed [EW-1:0]   id_x [NCH],
  input  logic signed [EW-1:0]   id_z,
  output logic signed [EW-1:0]   id_err,
  output logic signed [WW-1:0]   id_weight [NCH],
  // 3. adaptive threshold logic
  input  logic                   atl_train,
  input  logic                   atl_target,
  input  sc_pkg::tern_t          atl_x [NIN],
  output sc_pkg::tern_t          atl_y,
  output logic signed [7:0]      atl_w [NIN],
  output logic                   atl_updated,
  // 4. Bayes predictor
  input  logic                   by_est,
  input  logic                   by_e,
  input  logic [NEV-1:0]         by_ei,
  input  logic                   by_predict,
  output logic                   by_pred,
  output logic [W-1:0]           by_pred_count,
  output logic [W-1:0]           by_p0_count,
  output logic [W-1:0]           by_pi_count [NEV],
  // 5. Markov model
  input  logic                   mk_est_valid,
  input  logic [$clog2(NS)-1:0]  mk_est_from,
  input  logic [$clog2(NS)-1:0]  mk_est_to,
  input  logic                   mk_load,
  input  logic [$clog2(NS)-1:0]  mk_load_state,
  input  logic                   mk_run,
  input  logic                   mk_clr_visits,
  output logic [NS-1:0]          mk_state,
  output logic [NS-1:0]          mk_reached,
  output logic [15:0]            mk_visits [NS],
  output logic [W-1:0]           mk_count [NS][NS]
);
  // ---- 1. conversion and arithmetic section ----
  logic [W-1:0] in_rnd;
  logic         addie_x;

  sc_ramp_adc #(.W(W)) u_adc (
    .clk, .rst_n, .start(adc_start), .cmp(adc_cmp),
    .ramp(adc_ramp), .busy(adc_busy), .done(adc_done), .value(adc_value)
  );

  sc_lfsr #(.W(W), .SEED(W'(8'h91))) u_in_rng (.clk, .rst_n, .en(1'b1), .rnd(in_rnd));
  sc_d2s  #(.W(W)) u_in_d2s (.value(adc_value), .rnd(in_rnd), .bin_out(s_in),
                             .svalue('0), .rnd_t('0), .tern_out());

  sc_mult_and u_and (.a(s_in), .b(line_b), .y(s_prod));
  sc_summer #(.W(W), .SEED(W'(8'h5B))) u_sum (
    .clk, .rst_n, .lambda, .a(s_prod), .b(line_c), .y(s_sum)
  );
  sc_summer_lv u_sum_lv (.clk, .rst_n, .a(s_in), .b(line_c), .y(s_sum_lv));

  always_comb begin
    unique case (sel)
      2'd0:    addie_x = s_in;
      2'd1:    addie_x = s_prod;
      2'd2:    addie_x = s_sum;
      default: addie_x = s_sum_lv;
    endcase
  end

  sc_addie #(.W(W), .SEED(W'(8'h2B))) u_addie (
    .clk, .rst_n, .hold(addie_hold), .x(addie_x), .out(addie_out), .count(addie_count)
  );

  // ---- 2. steepest-descent identifier ----
  sc_descent_identifier #(.NCH(NCH), .EW(EW), .WW(WW), .WF(WF), .AW(AW)) u_id (
    .clk, .rst_n, .adapt(id_adapt), .mode(id_mode), .amp(id_amp),
    .x(id_x), .z(id_z), .err(id_err), .weight(id_weight)
  );

  // ---- 3. adaptive threshold logic ----
  sc_atl #(.NIN(NIN)) u_atl (
    .clk, .rst_n, .train(atl_train), .target(atl_target), .x(atl_x),
    .y(atl_y), .w(atl_w), .updated(atl_updated)
  );

  // ---- 4. Bayes predictor ----
  sc_bayes_predictor #(.NEV(NEV), .W(W)) u_bayes (
    .clk, .rst_n, .est(by_est), .e(by_e), .ei(by_ei), .predict(by_predict),
    .pred(by_pred), .pred_count(by_pred_count), .p0_count(by_p0_count),
    .pi_count(by_pi_count)
  );

  // ---- 5. Markov model ----
  sc_markov_model #(.NS(NS), .W(W), .CW(16)) u_mk (
    .clk, .rst_n, .est_valid(mk_est_valid), .est_from(mk_est_from), .est_to(mk_est_to),
    .load(mk_load), .load_state(mk_load_state), .run(mk_run), .clr_visits(mk_clr_visits),
    .state(mk_state), .reached(mk_reached), .visits(mk_visits), .count(mk_count)
  );
endmodule
