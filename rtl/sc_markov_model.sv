// sc_markov_model: Markov model of the transitions between NS state classes.
//
// One sc_markov_unit per state S_i (S_0 stands for every state outside the modelled set).
// Estimation: when the process is seen to go from S_i to S_j (est_valid with est_from = i,
// est_to = j) the ESTimate line of unit i and its j'th input are turned ON for one clock.
// Prediction: a one-hot register of state flip-flops marks the current simulated state. load
// sets flip-flop load_state alone ON; while run is ON, at each clock the output of the
// current state's unit decides which flip-flop is ON next, so the register performs a direct
// random walk with the estimated transition probabilities. For each state a visit counter
// counts the clocks of a run in which its flip-flop is ON (cleared by clr_visits), and a
// reached flag records, since the last load, whether it has been ON. Running from S_i for N
// clocks many times and counting the runs that reach S_k estimates the probability of going
// from S_i to S_k within N steps; the visit counts give occupancies and path lengths.
// Timing: all registered. Estimation and prediction may not be requested in the same clock
// (est_valid has priority over run for the units, the state register is independent).
// Structure follows the source design; index-coded transition ports, the visit counters,
// the reached flags and all widths are this design's choices.
module sc_markov_model #(
  parameter int unsigned NS = 4,
  parameter int unsigned W  = 8,
  parameter int unsigned CW = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   est_valid,
  input  logic [$clog2(NS)-1:0]  est_from,
  input  logic [$clog2(NS)-1:0]  est_to,
  input  logic                   load,
  input  logic [$clog2(NS)-1:0]  load_state,
  input  logic                   run,
  input  logic                   clr_visits,
  output logic [NS-1:0]          state,
  output logic [NS-1:0]          reached,
  output logic [CW-1:0]          visits [NS],
  output logic [W-1:0]           count [NS][NS]
);
  logic [NS-1:0] tout [NS];
  logic [NS-1:0] tin;
  logic [NS-1:0] next_state;

  assign tin = NS'(1) << est_to;

  for (genvar i = 0; i < NS; i++) begin : g_unit
    sc_markov_unit #(.NS(NS), .W(W), .SEED(W'(8'h6D + 8'd37 * i))) u_unit (
      .clk, .rst_n,
      .est(est_valid && est_from == i),
      .tin, .tout(tout[i]), .count(count[i])
    );
  end

  always_comb begin
    next_state = '0;
    for (int i = 0; i < NS; i++) if (state[i]) next_state |= tout[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= NS'(1);
      reached <= NS'(1);
      for (int i = 0; i < NS; i++) visits[i] <= '0;
    end else begin
      if (load) begin
        state   <= NS'(1) << load_state;
        reached <= NS'(1) << load_state;
      end else if (run) begin
        state   <= next_state;
        reached <= reached | next_state;
      end
      for (int i = 0; i < NS; i++) begin
        if (clr_visits)                          visits[i] <= '0;
        else if (run && !load && state[i] && visits[i] != '1) visits[i] <= visits[i] + 1'b1;
      end
    end
  end

  a_state_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(state))
    else $error("sc_markov_model: state register is not one-hot");
endmodule
