// sc_lfsr: pseudorandom shift-register noise source.
//
// Produces one uniformly distributed W-bit number per clock, taking every value in
// 1 .. 2**W-1 once per period of 2**W-1 clocks. It is a right-shifting Galois shift register
// with a primitive feedback polynomial taken from sc_pkg::lfsr_mask, advanced STEPS shifts per
// clock (leap-forward, STEPS = W, or the next count coprime to 2**W-1 so that the period is
// kept). A single shift per clock would leave successive numbers nearly halves of each
// other; stepping a whole word per clock makes successive numbers, and so successive levels
// of every stochastic line derived from them, close to independent. The stochastic elements
// compare a stored count with this number to turn the count into a random logic level.
// Interface: clk, active-low synchronous reset rst_n (loads SEED), en advances the register,
// rnd is the current state (registered). Widths 3 to 24 are supported.
// The use of a pseudorandom shift register follows the source design; the polynomial,
// the seed and the reset behaviour are this design's choices.
module sc_lfsr #(
  parameter int unsigned       W    = 8,
  parameter logic [W-1:0]      SEED = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] rnd
);
  import sc_pkg::*;

  localparam logic [31:0]  MASK32 = lfsr_mask(W);
  localparam logic [W-1:0] MASK   = MASK32[W-1:0];
  localparam logic [W-1:0] SEED_NZ = (SEED == '0) ? W'(1) : SEED;

  function automatic int gcd(input longint m, input longint n);
    while (n != 0) begin
      automatic longint t = m % n;
      m = n; n = t;
    end
    return int'(m);
  endfunction

  function automatic int leap(input int width);
    automatic int st = width;
    while (gcd(longint'(st), (longint'(1) << width) - 1) != 1) st++;
    return st;
  endfunction

  localparam int STEPS = leap(W);

  logic [W-1:0] nxt;

  always_comb begin
    nxt = rnd;
    for (int k = 0; k < STEPS; k++) nxt = (nxt >> 1) ^ (nxt[0] ? MASK : '0);
  end

  initial begin
    assert (W >= 3 && W <= 24) else $error("sc_lfsr: unsupported width %0d", W);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  rnd <= SEED_NZ;
    else if (en) rnd <= nxt;
  end
endmodule
