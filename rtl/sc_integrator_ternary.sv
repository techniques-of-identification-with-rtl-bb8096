// sc_integrator_ternary: two-input summing integrator for ternary (UP/DOWN) quantities.
//
// A W-bit reversible counter read as a signed two's-complement number. Each input pair adds
// +1 (UP ON), -1 (DOWN ON) or 0, so with both inputs the counter steps by 0, 1 or 2 either way
// (the source feeds the first or second counter stage). A single-input integrator leaves b at
// zero. Counting happens only while hold is ON; the count saturates at its two extremes.
// The count is re-coded as a ternary pair: its sign bit selects the UP or DOWN line and its
// magnitude is compared with an internal (W-1)-bit sc_lfsr through sc_d2s, so at the largest
// positive count UP is ON at every clock.
// Timing: count registered, out combinational from registers. The counting and readout rules
// follow the source design; saturation, reset to zero and widths are this design's choices.
module sc_integrator_ternary #(
  parameter int unsigned    W    = 8,
  parameter logic [W-2:0]   SEED = 7'h35
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                hold,
  input  sc_pkg::tern_t       a,
  input  sc_pkg::tern_t       b,
  output sc_pkg::tern_t       out,
  output logic signed [W-1:0] count
);
  import sc_pkg::*;

  localparam logic signed [W-1:0] CMAX = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] CMIN = {1'b1, {(W-1){1'b0}}};

  logic [W-2:0]       rnd_t;
  logic signed [2:0]  step;
  logic signed [W:0]  sum;

  sc_lfsr #(.W(W-1), .SEED(SEED)) u_rng (.clk, .rst_n, .en(1'b1), .rnd(rnd_t));
  sc_d2s  #(.W(W)) u_cmp (.value('0), .rnd('1), .bin_out(),
                          .svalue(count), .rnd_t, .tern_out(out));

  always_comb begin
    step = 3'(signed'({1'b0, a.up})) - 3'(signed'({1'b0, a.dn}))
         + 3'(signed'({1'b0, b.up})) - 3'(signed'({1'b0, b.dn}));
    sum  = (W+1)'(count) + (W+1)'(step);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) count <= '0;
    else if (hold) begin
      if (sum > (W+1)'(CMAX))      count <= CMAX;
      else if (sum < (W+1)'(CMIN)) count <= CMIN;
      else                         count <= sum[W-1:0];
    end
  end
endmodule
