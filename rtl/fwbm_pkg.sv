// fwbm_pkg: types shared by the fixed-width radix-4 Booth multiplier.
//
// A radix-4 (modified) Booth digit takes one of the values -2, -1, 0, +1, +2.
// The encoder describes it with three select lines: `one` selects the
// multiplicand, `two` selects the multiplicand shifted left by one, and `neg`
// inverts the selected word. When `neg` is set, the +1 that completes the two's
// complement is added as a separate bit at the row's least significant column.
// This one-hot-plus-sign form is this design's choice. It is the usual form
// for a mux-based partial-product generator.
package fwbm_pkg;

  typedef struct packed {
    logic neg;  // digit is negative
    logic one;  // |digit| == 1
    logic two;  // |digit| == 2
  } booth_sel_t;

  // Number of Booth digits (partial-product rows) for an n-bit multiplier.
  function automatic int unsigned booth_rows(int unsigned n);
    return n / 2;
  endfunction

endpackage
