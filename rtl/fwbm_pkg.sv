// fwbm_pkg: types and constants shared by the fixed-width Booth multiplier.
//
// The multiplier Y is recoded radix-4 (modified Booth): each digit looks at
// three overlapping bits {y[2i+1], y[2i], y[2i-1]} and selects one of
// {-2,-1,0,+1,+2} times the multiplicand. A digit is carried as a
// booth_sel_t: 'one' selects 1x, 'two' selects 2x, 'neg' negates (ones'
// complement of the selected multiple plus a 1 injected at the row's LSB
// column). The radix-4 choice is this design's; the published architecture
// has a Booth encoder without fixing its radix.
//
// trunc_bias() is the constant that stands in for the discarded minor
// truncated part TP_mi. A radix-4 partial-product bit is nonzero with
// probability 3/8 for random operands, and the bits below column L-1 then
// add up to an expected (3L/16) * 2^(L-1). Rounding the product to its
// upper L bits adds another 2^(L-1). The result, in units of 2^(L-1), is
// floor(3L/16) + 1. This estimator is this design's choice.
package fwbm_pkg;

  typedef struct packed {
    logic neg;  // negative digit
    logic two;  // |digit| == 2
    logic one;  // |digit| == 1
  } booth_sel_t;

  // Radix-4 Booth digit of the bit triple {b2, b1, b0} = {y[2i+1], y[2i], y[2i-1]}.
  function automatic booth_sel_t booth_select(input logic [2:0] trip);
    booth_sel_t s;
    s.one = trip[1] ^ trip[0];
    s.two = (trip == 3'b100) || (trip == 3'b011);
    s.neg = trip[2] & ~(trip[1] & trip[0]);
    return s;
  endfunction

  // Compensation bias for TP_mi plus rounding, in units of 2^(L-1).
  function automatic int unsigned trunc_bias(input int unsigned l);
    return (3 * l) / 16 + 1;
  endfunction

endpackage
