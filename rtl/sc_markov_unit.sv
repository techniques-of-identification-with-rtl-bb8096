// sc_markov_unit: transition-probability unit for one state S_i of the Markov model.
//
// Holds NS counters c_ij, one per possible next state S_j, whose sum is always N = 2**W-1,
// so c_ij/N is the estimated transition probability p_ij and sum_j p_ij = 1. One random
// number r from a single sc_lfsr (uniform over 1..N) picks exactly one output line: tout[j] is
// ON when c_i0+..+c_i(j-1) < r <= c_i0+..+c_ij, with probability c_ij/N. This is the one-of-NS
// form of the stochastic integrator: a transition goes to one and only one next state.
// Estimation (est ON, tin one-hot: the transition S_i -> S_j that occurred) uses the ADDIE
// principle with the feedback built in: the counter of the observed state goes up when its
// output is OFF and the counter of the selected output goes down when its input is OFF. The
// sum is preserved and each c_ij/N tends to the relative frequency of the transition.
// Prediction uses tout as the randomly chosen next state.
// Timing: counters registered; tout combinational from registers.
// Following the source: one counter per p_ij, a single random generator per unit, built-in
// feedback and one-of-NS outputs. The cumulative comparison and the initial equal split of
// the counts are this design's choices.
module sc_markov_unit #(
  parameter int unsigned  NS   = 4,
  parameter int unsigned  W    = 8,
  parameter logic [W-1:0] SEED = 8'h6D
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          est,
  input  logic [NS-1:0] tin,
  output logic [NS-1:0] tout,
  output logic [W-1:0]  count [NS]
);
  localparam int unsigned N     = (2 ** W) - 1;
  localparam int unsigned SHARE = N / NS;

  logic [W-1:0]  rnd;
  logic [W:0]    cum [NS+1];

  sc_lfsr #(.W(W), .SEED(SEED)) u_rng (.clk, .rst_n, .en(1'b1), .rnd);

  always_comb begin
    cum[0] = '0;
    for (int j = 0; j < NS; j++) cum[j+1] = cum[j] + (W+1)'(count[j]);
    for (int j = 0; j < NS; j++)
      tout[j] = ((W+1)'(rnd) > cum[j]) && ((W+1)'(rnd) <= cum[j+1]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < NS; j++)
        count[j] <= (j == NS - 1) ? W'(N - SHARE * (NS - 1)) : W'(SHARE);
    end else if (est) begin
      for (int j = 0; j < NS; j++) begin
        if (tin[j] && !tout[j])      count[j] <= count[j] + 1'b1;
        else if (!tin[j] && tout[j]) count[j] <= count[j] - 1'b1;
      end
    end
  end

  a_tin_onehot: assert property (@(posedge clk) disable iff (!rst_n) est |-> $onehot(tin))
    else $error("sc_markov_unit: est with a transition input that is not one-hot");
  a_tout_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(tout))
    else $error("sc_markov_unit: output selection is not one-hot");
endmodule
