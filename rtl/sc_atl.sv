// sc_atl: stochastic adaptive threshold logic element with bounded discrete weights.
//
// Output (threshold element): with S = sum(W_i X_i),
//   y = +1 if S >= THETA,  0 if |S| < THETA,  -1 if S <= -THETA.
// Inputs are two-level (each X_i is +1, -1 or 0 on a ternary pair). Training: the target
// sign folds the example into the set to be classified positive, V_i = target * X_i. When
// train is ON and sum(W_i V_i) <= MARGIN the example is misclassified and each weight takes
//   W_i <- W_i + phi_i V_i,
// phi_i being an independent random bit (0 or 1) per weight from an internal sc_lfsr; weights
// saturate at +-WMAX. Because only a random subset of weights moves, the weight vector
// cannot be trapped in the limit cycles a deterministic bounded-weight rule can fall into,
// and it reaches a solution with probability tending to one.
// Interface: x, target (1 = positive class), train; y and the weights are outputs.
// Timing: weights registered, one training step per clock; y combinational.
// The update rule and threshold follow the source design; the target folding, MARGIN, THETA,
// NIN and reset to zero weights are this design's choices (WMAX = 2 is the source's example).
module sc_atl #(
  parameter int unsigned NIN   = 4,
  parameter int          WMAX  = 2,
  parameter int          THETA = 1,
  parameter int          MARGIN = 0,
  parameter int unsigned RW    = 16,
  parameter logic [RW-1:0] SEED = 16'hACE1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  train,
  input  logic                  target,
  input  sc_pkg::tern_t         x [NIN],
  output sc_pkg::tern_t         y,
  output logic signed [7:0]     w [NIN],
  output logic                  updated
);
  import sc_pkg::*;

  logic [RW-1:0] rnd;
  int            s, sv;
  logic          miss;

  sc_lfsr #(.W(RW), .SEED(SEED)) u_rng (.clk, .rst_n, .en(1'b1), .rnd);

  initial begin
    assert (NIN <= RW) else $error("sc_atl: NIN must not exceed RW");
    assert (WMAX < 128) else $error("sc_atl: WMAX too large for 8-bit weights");
  end

  always_comb begin
    s = 0;
    for (int i = 0; i < NIN; i++) s += int'(w[i]) * tern_val(x[i]);
    sv   = target ? s : -s;
    miss = train && (sv <= MARGIN);
    y.up = (s >= THETA);
    y.dn = (s <= -THETA);
  end

  assign updated = miss;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NIN; i++) w[i] <= '0;
    end else if (miss) begin
      for (int i = 0; i < NIN; i++) begin
        if (rnd[i]) begin
          automatic int v  = target ? tern_val(x[i]) : -tern_val(x[i]);
          automatic int nw = int'(w[i]) + v;
          if (nw > WMAX)       w[i] <= 8'(WMAX);
          else if (nw < -WMAX) w[i] <= 8'(-WMAX);
          else                 w[i] <= 8'(nw);
        end
      end
    end
  end
endmodule
