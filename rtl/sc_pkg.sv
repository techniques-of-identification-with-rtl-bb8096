// sc_pkg: types and helper functions shared by the stochastic computing elements.
//
// A stochastic quantity is carried on logic lines whose probability of being ON at a clock
// edge encodes its value. Three mappings are used:
//   unipolar  (one line)  p(ON) = E/V,             0 <= E <= V
//   ternary   (UP, DOWN)  E/V = p(UP) - p(DOWN),  -V <= E <= V
//   bipolar   (one line)  p(ON) = E/2V + 1/2,     -V <= E <= V
// The ternary pair is the struct tern_t below. lfsr_mask() gives the feedback mask of a
// maximal-length Galois shift register; the masks are standard primitive polynomials
// (a design choice, the noise source is only named as a pseudorandom shift register).
package sc_pkg;

  // Ternary (UP/DOWN) line pair. Both lines ON at once is never produced by these elements.
  typedef struct packed {
    logic up;
    logic dn;
  } tern_t;

  // Feedback mask of a right-shifting Galois LFSR of width w with period 2**w - 1.
  function automatic logic [31:0] lfsr_mask(input int w);
    case (w)
      3:  return 32'h6;
      4:  return 32'hC;
      5:  return 32'h14;
      6:  return 32'h30;
      7:  return 32'h60;
      8:  return 32'hB8;
      9:  return 32'h110;
      10: return 32'h240;
      11: return 32'h500;
      12: return 32'hE08;
      13: return 32'h1C80;
      14: return 32'h3802;
      15: return 32'h6000;
      16: return 32'hD008;
      17: return 32'h12000;
      18: return 32'h20400;
      19: return 32'h72000;
      20: return 32'h90000;
      21: return 32'h140000;
      22: return 32'h300000;
      23: return 32'h420000;
      24: return 32'hE10000;
      default: return 32'h0;
    endcase
  endfunction

  // Value of a ternary pair as an integer -1, 0 or +1.
  function automatic int tern_val(input tern_t t);
    return int'(t.up) - int'(t.dn);
  endfunction

endpackage
