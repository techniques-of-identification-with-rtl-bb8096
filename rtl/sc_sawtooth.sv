// sc_sawtooth: dither generator of adjustable amplitude for the descent channels.
//
// gamma is a sawtooth: a free-running W-bit counter n read as s = n - 2**(W-1), sweeping the
// signed range once every 2**W clocks. delta is pseudorandom: the top W bits r of a longer
// (W+8)-bit sc_lfsr, read as r - 2**(W-1). The longer register keeps the pairing of the two
// dithers from repeating after a few sawtooth periods, which would again correlate them;
// its low 8 bits serve only as extra state and are not read. Each is scaled by amp/2**AW, so amp = 2**AW gives full range
// and amp = 0 no dither at all, and each is then limited to the symmetric range
// -(2**(W-1)-1) .. 2**(W-1)-1. They stand for the random variables added to E and X before
// their comparators, uniform and symmetric over the signal range. The two must be
// independent of each other: deriving both from one counter correlates the two comparator
// decisions and biases the product, so the second comes from the shift register.
// Timing: outputs are combinational from registers.
// A high-frequency sawtooth of adjustable amplitude follows the source design; the digital
// form, the pseudorandom second dither and the widths are this design's choices.
module sc_sawtooth #(
  parameter int unsigned  W    = 8,
  parameter int unsigned  AW   = 4,
  parameter logic [W+7:0] SEED = 16'hA7E5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [AW:0]         amp,
  output logic signed [W-1:0] gamma,
  output logic signed [W-1:0] delta
);
  localparam logic [W-1:0]        MID  = W'(1) << (W-1);
  localparam logic signed [W-1:0] SMIN = {1'b1, {(W-1){1'b0}}};

  logic [W-1:0]            n, r;
  logic [W+7:0]            r_long;
  logic signed [W+AW+1:0]  pg, pd;
  logic signed [W-1:0]     g0, d0;

  sc_lfsr #(.W(W + 8), .SEED(SEED)) u_rng (.clk, .rst_n, .en(1'b1), .rnd(r_long));
  assign r = r_long[W+7:8];

  always_ff @(posedge clk) begin
    if (!rst_n) n <= '0;
    else        n <= n + 1'b1;
  end

  always_comb begin
    pg    = (W+AW+2)'(signed'(n ^ MID)) * (W+AW+2)'(signed'({1'b0, amp}));
    pd    = (W+AW+2)'(signed'(r ^ MID)) * (W+AW+2)'(signed'({1'b0, amp}));
    g0    = W'(pg >>> AW);
    d0    = W'(pd >>> AW);
    gamma = (g0 == SMIN) ? SMIN + 1'b1 : g0;
    delta = (d0 == SMIN) ? SMIN + 1'b1 : d0;
  end
endmodule
