// sc_d2s: digital-to-stochastic converter (comparator against a random number).
//
// Binary path: bin_out is ON when rnd <= value. With rnd uniform over 1 .. 2**W-1 (an sc_lfsr
// of width W) this gives p(ON) = value/(2**W-1): an unsigned count k of an N+1 state store
// (N = 2**W-1) becomes a line with p = k/N, unipolar or bipolar by interpretation.
// Ternary path: svalue is a signed two's-complement count. Its sign bit selects the UP or
// DOWN line and its magnitude is compared with rnd_t, uniform over 1 .. 2**(W-1)-1: the
// selected line is ON when rnd_t <= magnitude. The magnitude of a negative count is taken as
// its ones' complement (~svalue), so counts 0 and -1 both mean zero and the largest positive
// and negative counts give a line that is ON at every clock.
// Combinational. Comparing a count with a uniform digital random number follows the source
// design; the ones' complement magnitude and the "<=" convention are this design's choices.
module sc_d2s #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]        value,
  input  logic [W-1:0]        rnd,
  output logic                bin_out,
  input  logic signed [W-1:0] svalue,
  input  logic [W-2:0]        rnd_t,
  output sc_pkg::tern_t       tern_out
);
  logic [W-2:0] mag;
  logic         on_t;

  always_comb begin
    bin_out     = (rnd <= value);
    mag         = svalue[W-1] ? ~svalue[W-2:0] : svalue[W-2:0];
    on_t        = (rnd_t <= mag) && (rnd_t != '0 || mag != '0);
    tern_out.up = on_t & ~svalue[W-1];
    tern_out.dn = on_t &  svalue[W-1];
  end
endmodule
