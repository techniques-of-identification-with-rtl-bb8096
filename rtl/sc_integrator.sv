// sc_integrator: multi-input stochastic integrator for unipolar / bipolar lines.
//
// An N+1 state reversible counter (N = 2**W-1, count k = 0 .. N). At a clock where hold is
// ON the count goes up by one when every enabled input is ON and down by one when every
// enabled input is OFF; otherwise it stays. With two inputs this is the two-input summing
// integrator of bipolar quantities; with more inputs it is the extended integrator of the Bayes
// predictor. Inputs whose mask bit is 0 are left out of both tests (the gating "according to
// the events that occurred"). The count saturates at 0 and N.
// The stored count is read out as a random line by comparing it with an internal sc_lfsr:
// out is ON with probability k/N. With SWITCH = 1 the comparator is dropped and out is ON
// when the count is above mid-level (k >= 2**(W-1)), the switching-function connection.
// Interface: hold is the HOLD/ESTimate line of the source design and enables counting when ON;
// count is the parallel output. Timing: count and the random number are registered, out is
// combinational from them, so it changes only at a clock edge.
// Counting rules follow the source design; saturation, the mask port, the reset value INIT and
// the width are this design's choices.
module sc_integrator #(
  parameter int unsigned  W      = 8,
  parameter int unsigned  NIN    = 2,
  parameter bit           SWITCH = 1'b0,
  parameter logic [W-1:0] SEED   = 8'h1D,
  parameter logic [W-1:0] INIT   = W'(1) << (W-1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           hold,
  input  logic [NIN-1:0] in,
  input  logic [NIN-1:0] mask,
  output logic           out,
  output logic [W-1:0]   count
);
  localparam logic [W-1:0] KMAX = '1;

  logic [W-1:0] rnd;
  logic         all_on, all_off, cmp_out;

  sc_lfsr #(.W(W), .SEED(SEED)) u_rng (.clk, .rst_n, .en(1'b1), .rnd);
  sc_d2s  #(.W(W)) u_cmp (.value(count), .rnd, .bin_out(cmp_out),
                          .svalue('0), .rnd_t('0), .tern_out());

  always_comb begin
    all_on  = (mask != '0) && ((in & mask) == mask);
    all_off = (mask != '0) && ((in & mask) == '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) count <= INIT;
    else if (hold) begin
      if (all_on && count != KMAX)    count <= count + 1'b1;
      else if (all_off && count != 0) count <= count - 1'b1;
    end
  end

  assign out = SWITCH ? count[W-1] : cmp_out;
endmodule
