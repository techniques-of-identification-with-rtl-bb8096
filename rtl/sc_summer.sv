// sc_summer: two-input stochastic summer (random switch).
//
// The output line is switched at random to one of the two inputs: to a with probability
// lambda and to b otherwise, so it represents lambda*Ea + (1-lambda)*Eb in the unipolar or
// bipolar code. As in the source design, a first flip-flop (ff1) takes a random state at each
// clock and passes it to a second flip-flop (ff2) at the next; ff2 selects the input that is
// reproduced at the output. ff1 is ON with probability lambda/(2**W-1), from a comparison of
// the lambda input with an internal sc_lfsr (this weighting input is this design's choice; the
// source shows a fixed random state, lambda = 1/2 is lambda = 2**(W-1)).
// Timing: y follows a and b combinationally; the selection is registered.
module sc_summer #(
  parameter int unsigned  W    = 8,
  parameter logic [W-1:0] SEED = 8'h5B
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] lambda,
  input  logic         a,
  input  logic         b,
  output logic         y
);
  logic [W-1:0] rnd;
  logic         ff1, ff2, ff1_d;

  sc_lfsr #(.W(W), .SEED(SEED)) u_rng (.clk, .rst_n, .en(1'b1), .rnd);
  sc_d2s  #(.W(W)) u_cmp (.value(lambda), .rnd, .bin_out(ff1_d),
                          .svalue('0), .rnd_t('0), .tern_out());

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ff1 <= 1'b0;
      ff2 <= 1'b0;
    end else begin
      ff1 <= ff1_d;
      ff2 <= ff1;
    end
  end

  assign y = ff2 ? a : b;
endmodule
